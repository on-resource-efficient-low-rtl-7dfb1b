// Limited-resource, MAC-level 1-D discrete wavelet transform processor.
//
// Instead of one lowpass and one highpass filter per octave, the whole
// S-octave transform is flattened onto r MACs.  Both analysis filters and the
// decimation by two are merged into one scheduling period of
// q = ceil((m+n)/r) cycles that consumes a pair of samples (B1 older, B2
// newer) of one octave and produces one approximation and one detail sample
// of the next level.  Each octave s keeps its own bank of m+n transposed-form
// partial-sum registers R_{s,1..m+n}; after a period R_{s,1} holds the
// approximation and R_{s,m+1} the detail.  dwt_controller supplies, per cycle
// and per MAC, the coefficient, the buffer, the feedback register and the
// destination register, and chooses the octave of every period as soon as
// its input pair is ready, so only one sample per octave waits between
// octaves instead of whole rows of data.
//
// Blocks: coefficient register bank (m+n words, reset to Daubechies (9,7),
// rewritable), input buffer (4 samples, two pairs), B1/B2 pair registers,
// r MACs, S output register banks, one held sample per octave 1..S-1, and
// the output latch.
//
// Fixed point (this design's choice): coefficients Q2.14; MAC sums are kept
// at DATA_W+COEF_W+4 bits; an approximation passed to the next octave, and
// every output, is the sum shifted right by COEF_FRAC (truncation) and
// saturated to DATA_W bits.
//
// Interface:
//   coef_we/coef_addr/coef_data  set-up port: index 0..m-1 = L1..Lm,
//                                m..m+n-1 = H1..Hn
//   in_valid/in_ready/in_data    input samples, any rate up to
//                                2^S / ((2^S-1) q) per cycle
//   out_valid                    one pulse per period, at its end
//   out_level                    level 1..S of out_detail
//   out_approx_valid/out_approx  approximation of level S (final octave)
//   busy_o/stall_o               a period is running / waiting for input
// Timing: a period takes q cycles with no gap between periods while input
// keeps up; every 2^S - 1 periods one level-S pair is produced.
module dwt_processor #(
  parameter int unsigned NUM_MAC = dwt_pkg::NUM_MAC,
  parameter int unsigned M       = dwt_pkg::LP_TAPS,
  parameter int unsigned N       = dwt_pkg::HP_TAPS,
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
  input  logic signed [DW-1:0]         in_data,
  output logic                         out_valid,
  output logic [$clog2(S+1)-1:0]       out_level,
  output logic signed [DW-1:0]         out_detail,
  output logic                         out_approx_valid,
  output logic signed [DW-1:0]         out_approx,
  output logic                         busy_o,
  output logic                         stall_o
);
  import dwt_pkg::*;
  localparam int unsigned AW = DW + CW + 4;
  localparam int unsigned T  = M + N;
  localparam int unsigned SW = $clog2(S + 1);
  localparam int unsigned RIW = $clog2(T);

  // ---------------------------------------------------------------- control
  logic             run, load_in, load_oct, store_half, emit;
  logic [SW-1:0]    stage;
  mac_op_t          ops [NUM_MAC];
  logic             pair_avail;

  dwt_controller #(.NUM_MAC(NUM_MAC), .M(M), .N(N), .S(S)) u_ctrl (
    .clk, .rst_n, .pair_avail_i(pair_avail), .run_o(run), .stage_o(stage),
    .row_o(), .ops_o(ops), .load_in_o(load_in), .load_oct_o(load_oct),
    .store_half_o(store_half), .emit_o(emit), .stall_o(stall_o));

  assign busy_o = run;

  // ----------------------------------------------------- coefficient bank
  logic signed [CW-1:0] coef [T];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < T; i++)
        coef[i] <= (M == 9 && N == 7) ? cdf97_coef(i) : '0;
    end else if (coef_we && int'(coef_addr) < T) begin
      coef[coef_addr[RIW-1:0]] <= coef_data;
    end
  end

  // ------------------------------------------------ input buffer (2 pairs)
  localparam int unsigned FD = 4;
  logic signed [DW-1:0] fifo [FD];
  logic [1:0]           wp, rp;
  logic [2:0]           cnt;
  logic                 push;
  assign in_ready   = (cnt < 3'(FD));
  assign push       = in_valid && in_ready;
  assign pair_avail = (cnt >= 3'd2);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      for (int i = 0; i < FD; i++) fifo[i] <= '0;
    end else begin
      if (push) begin
        fifo[wp] <= in_data;
        wp       <= wp + 1'b1;
      end
      if (load_in) rp <= rp + 2'd2;
      cnt <= cnt + (push ? 3'd1 : 3'd0) - (load_in ? 3'd2 : 3'd0);
    end
  end

  // ------------------------------------------------------------- datapath
  logic signed [DW-1:0] b1, b2;              // pair registers (ping-pong)
  logic signed [AW-1:0] rb   [S][T];          // output register banks
  logic signed [DW-1:0] held [S];             // waiting sample per octave
  logic signed [AW-1:0] mac_fb  [NUM_MAC];
  logic signed [AW-1:0] mac_out [NUM_MAC];
  logic signed [CW-1:0] mac_c   [NUM_MAC];
  logic signed [DW-1:0] mac_d   [NUM_MAC];
  logic signed [AW-1:0] approx_sum, detail_sum;
  logic signed [DW-1:0] approx_q, detail_q;

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
      mac_d[j]  = ops[j].b2 ? b2 : b1;
      mac_fb[j] = ops[j].fb_en ? rb[stage][ops[j].fb[RIW-1:0]] : '0;
    end
  end

  always_comb begin
    // Outputs of the period as they stand after this cycle's writes.
    approx_sum = rb[stage][0];
    detail_sum = rb[stage][M];
    for (int j = 0; j < NUM_MAC; j++) begin
      if (ops[j].en && ops[j].acc == '0)           approx_sum = mac_out[j];
      if (ops[j].en && int'(ops[j].acc) == int'(M)) detail_sum = mac_out[j];
    end
    approx_q = quant(approx_sum);
    detail_q = quant(detail_sum);
  end

  for (genvar j = 0; j < NUM_MAC; j++) begin : g_mac
    dwt_mac #(.DW(DW), .CW(CW), .AW(AW)) u_mac (
      .coef_i(mac_c[j]), .data_i(mac_d[j]), .fb_i(mac_fb[j]), .acc_o(mac_out[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1 <= '0; b2 <= '0;
      for (int s = 0; s < S; s++) begin
        held[s] <= '0;
        for (int i = 0; i < T; i++) rb[s][i] <= '0;
      end
      out_valid        <= 1'b0;
      out_level        <= '0;
      out_detail       <= '0;
      out_approx_valid <= 1'b0;
      out_approx       <= '0;
    end else begin
      for (int j = 0; j < NUM_MAC; j++)
        if (ops[j].en) rb[stage][ops[j].acc[RIW-1:0]] <= mac_out[j];
      if (load_in) begin
        b1 <= fifo[rp];
        b2 <= fifo[rp + 1'b1];
      end else if (load_oct) begin
        b1 <= held[stage + 1'b1];
        b2 <= approx_q;
      end
      if (store_half) held[stage + 1'b1] <= approx_q;
      out_valid        <= emit;
      out_approx_valid <= emit && (int'(stage) == S - 1);
      if (emit) begin
        out_level  <= stage + 1'b1;
        out_detail <= detail_q;
        out_approx <= approx_q;
      end
    end
  end
endmodule
