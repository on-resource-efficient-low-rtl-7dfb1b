// Limited-resource, MAC-level inverse DWT (one synthesis level per period).
//
// Runs the inverse of dwt_processor's transform on the same kind of datapath:
// r MACs, a coefficient bank, one bank of transposed-form partial-sum
// registers per level, and a schedule table.  Each scheduling period of
// q = ceil((m'+n')/r) cycles takes one approximation x and one detail y of
// a level and produces the two reconstructed samples of the level below:
//   even = sum_t L'[2t] x(k-t) + H'[2t] y(k-t)
//   odd  = sum_t L'[2t+1] x(k-t) + H'[2t+1] y(k-t)
// i.e. upsampling by two, filtering by L' and H', and adding the two
// branches.  In the table, x meets every L' coefficient and y every H'
// coefficient; register R_i takes its addend from R_{i+2}, so the zero
// samples of the upsampled input cost no cycles; and two extra adders sum
// the lowpass and highpass registers of each phase.  These three points
// follow the source description of the inverse schedule; the exact table,
// the level-tagged input and the fixed-point format are this design's own
// (the source's own table equations are not fully given).
//
// Levels: every input carries in_level.  Each level keeps its own
// registers, so the streams of several levels may be interleaved; the
// caller pairs the reconstructed approximations of level s+1 with the
// details of level s and sends them back in.
//
// Fixed point: coefficients Q2.14 (reset to the (9,7) synthesis pair);
// sums kept at DW+CW+4 bits; outputs shifted right by FRAC (truncation) and
// saturated to DW bits.  With the reset coefficients and dwt_processor's
// forward transform, one level reconstructs its input 7 samples late,
// within a few LSB of truncation error.
//
// Interface:
//   coef_we/coef_addr/coef_data   index 0..m'-1 = L', m'..m'+n'-1 = H'
//   in_valid/in_ready             one (level, x, y) set per period
//   out_valid                     one cycle; out_even/out_odd/out_level valid
// Timing: in_ready is high when idle and in the last cycle of a period, so
// back-to-back inputs give one period every q cycles; out_valid rises the
// cycle after a period's last cycle.
module idwt_processor #(
  parameter int unsigned NUM_MAC = dwt_pkg::NUM_MAC,
  parameter int unsigned ML      = dwt_pkg::HP_TAPS,   // L' taps (m')
  parameter int unsigned NH      = dwt_pkg::LP_TAPS,   // H' taps (n')
  parameter int unsigned S       = dwt_pkg::STAGES,
  parameter int unsigned DW      = dwt_pkg::DATA_W,
  parameter int unsigned CW      = dwt_pkg::COEF_W,
  parameter int unsigned FRAC    = dwt_pkg::COEF_FRAC
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         coef_we,
  input  logic [dwt_pkg::IDX_W-1:0]    coef_addr,
  input  logic signed [CW-1:0]         coef_data,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [$clog2(S+1)-1:0]       in_level,
  input  logic signed [DW-1:0]         in_approx,
  input  logic signed [DW-1:0]         in_detail,
  output logic                         out_valid,
  output logic [$clog2(S+1)-1:0]       out_level,
  output logic signed [DW-1:0]         out_even,
  output logic signed [DW-1:0]         out_odd,
  output logic                         busy_o
);
  import dwt_pkg::*;
  localparam int unsigned AW  = DW + CW + 4;
  localparam int unsigned T   = ML + NH;
  localparam int unsigned Q   = sched_period(ML, NH, NUM_MAC);
  localparam int unsigned QW  = (Q > 1) ? $clog2(Q) : 1;
  localparam int unsigned RIW = $clog2(T);
  localparam int unsigned LW  = $clog2(S + 1);

  // ------------------------------------------------------------- control
  logic          busy;
  logic [QW-1:0] cnt;
  logic          last, accept;
  logic [LW-1:0] lvl;
  mac_op_t       ops [NUM_MAC];

  assign last     = busy && (int'(cnt) == Q - 1);
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;
  assign busy_o   = busy;

  always_comb begin
    for (int j = 0; j < NUM_MAC; j++) begin
      ops[j] = '0;
      for (int i = 0; i < Q; i++)
        if (busy && int'(cnt) == i) ops[j] = isched_op(i, j, ML, NH, NUM_MAC);
    end
  end

  // ---------------------------------------------------- coefficient bank
  logic signed [CW-1:0] coef [T];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < T; i++)
        coef[i] <= (ML == 7 && NH == 9) ? cdf97_syn_coef(i) : '0;
    end else if (coef_we && int'(coef_addr) < T) begin
      coef[coef_addr[RIW-1:0]] <= coef_data;
    end
  end

  // ------------------------------------------------------------ datapath
  logic signed [DW-1:0] xa, yd;
  logic signed [AW-1:0] rb [S][T];
  logic signed [AW-1:0] mac_out [NUM_MAC];
  logic signed [AW-1:0] mac_fb  [NUM_MAC];
  logic signed [CW-1:0] mac_c   [NUM_MAC];
  logic signed [DW-1:0] mac_d   [NUM_MAC];
  logic signed [AW-1:0] even_sum, odd_sum;

  function automatic logic signed [DW-1:0] quant(logic signed [AW-1:0] v);
    logic signed [AW-1:0] sh;
    sh = v >>> FRAC;
    if (sh > AW'((2 ** (DW - 1)) - 1)) return {1'b0, {(DW-1){1'b1}}};
    if (sh < -AW'(2 ** (DW - 1)))      return {1'b1, {(DW-1){1'b0}}};
    return sh[DW-1:0];
  endfunction

  always_comb begin
    for (int j = 0; j < NUM_MAC; j++) begin
      mac_c[j]  = coef[ops[j].coef[RIW-1:0]];
      mac_d[j]  = ops[j].b2 ? yd : xa;
      mac_fb[j] = ops[j].fb_en ? rb[lvl][ops[j].fb[RIW-1:0]] : '0;
    end
  end

  for (genvar j = 0; j < NUM_MAC; j++) begin : g_mac
    dwt_mac #(.DW(DW), .CW(CW), .AW(AW)) u_mac (
      .coef_i(mac_c[j]), .data_i(mac_d[j]), .fb_i(mac_fb[j]), .acc_o(mac_out[j]));
  end

  // the two extra adders: lowpass + highpass branch of each output phase
  assign even_sum  = rb[out_level][0] + rb[out_level][ML];
  assign odd_sum   = rb[out_level][1] + rb[out_level][ML + 1];
  assign out_even  = quant(even_sum);
  assign out_odd   = quant(odd_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; lvl <= '0;
      xa <= '0; yd <= '0;
      for (int s = 0; s < S; s++)
        for (int i = 0; i < T; i++) rb[s][i] <= '0;
      out_valid <= 1'b0;
      out_level <= '0;
    end else begin
      for (int j = 0; j < NUM_MAC; j++)
        if (ops[j].en) rb[lvl][ops[j].acc[RIW-1:0]] <= mac_out[j];
      out_valid <= last;
      if (last) out_level <= lvl;
      if (accept) begin
        busy <= 1'b1;
        cnt  <= '0;
        lvl  <= (int'(in_level) < S) ? in_level : '0;
        xa   <= in_approx;
        yd   <= in_detail;
      end else if (last) begin
        busy <= 1'b0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
