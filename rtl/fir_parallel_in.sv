// Parallel-in folded FIR filter.
//
// A K-tap FIR  y(n) = sum_{i=1..K} h_i x(n-i+1)  is written in transposed form
// with one partial-sum register per tap, R_i(n) = x(n) h_i + R_{i+1}(n-1),
// y(n) = R_1(n).  The delays are scaled by the folding factor
// F = ceil(K/R) and the graph is cut into F groups of R taps, so that the R
// multiplier-adders (MAs) update group c = 0 .. F-1 in cycle c of every
// sample period.  Each input sample is held for the whole period and
// broadcast to all MAs in parallel ("parallel-in").  Group c reads
// R_{cR+j+1}, which group c+1 overwrites only one cycle later, so every read
// sees the previous sample's partial sum, as the retimed graph requires.
//
// Storage, as in the document's cost model: a K-word coefficient bank in R
// groups, a K-word register file of W = m + b + ceil(log2 K) bits, and a
// mod-F counter.
//
// Interface (choices of this design, the document gives none):
//   coef_we/coef_addr/coef_data : write h_{coef_addr+1} into the bank.
//   in_valid/in_ready/in_x      : one sample per F cycles; in_ready is high
//                                 when idle and in the last cycle of a period.
//   out_valid/out_y             : out_valid pulses one cycle after a sample
//                                 is taken, with y(n) at full precision.
// Timing: one output every F clock cycles; latency 1 cycle.  Taps beyond K in
// the last group (when R does not divide K) are idle.
module fir_parallel_in #(
  parameter int unsigned K  = fir_pkg::TAPS,
  parameter int unsigned R  = fir_pkg::NUM_MA,
  parameter int unsigned XW = fir_pkg::X_W,
  parameter int unsigned HW = fir_pkg::H_W,
  parameter int unsigned W  = fir_pkg::bus_width(XW, HW, K)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         coef_we,
  input  logic [$clog2(K)-1:0]         coef_addr,
  input  logic signed [HW-1:0]         coef_data,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic signed [XW-1:0]         in_x,
  output logic                         out_valid,
  output logic signed [W-1:0]          out_y
);
  localparam int unsigned F  = fir_pkg::fold_factor(K, R);
  localparam int unsigned CW = (F > 1) ? $clog2(F) : 1;

  logic signed [HW-1:0] coef [K];      // coefficient register bank
  logic signed [W-1:0]  rf   [K];      // register file R_1 .. R_K
  logic signed [XW-1:0] xreg;          // sample broadcast to the MAs
  logic [CW-1:0]        cnt;           // mod-F counter: current group
  logic                 busy;

  logic signed [HW-1:0] ma_h   [R];
  logic signed [W-1:0]  ma_add [R];
  logic signed [W-1:0]  ma_out [R];
  logic [R-1:0]         ma_en;

  // Operand selection for MA j in cycle cnt: tap index t = cnt*R + j.
  always_comb begin
    for (int j = 0; j < R; j++) begin
      int t;
      t = int'(cnt) * R + j;
      ma_en[j]  = busy && (t < K);
      ma_h[j]   = '0;
      ma_add[j] = '0;
      for (int g = 0; g < F; g++) begin
        if (int'(cnt) == g && g * R + j < K) begin
          ma_h[j] = coef[g * R + j];
          if (g * R + j + 1 < K) ma_add[j] = rf[g * R + j + 1];
        end
      end
    end
  end

  for (genvar j = 0; j < R; j++) begin : g_ma
    fir_ma #(.XW(XW), .HW(HW), .W(W)) u_ma (
      .x_i(xreg), .h_i(ma_h[j]), .add_i(ma_add[j]), .acc_o(ma_out[j]));
  end

  assign in_ready = !busy || (int'(cnt) == F - 1);
  assign out_y    = rf[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      xreg      <= '0;
      out_valid <= 1'b0;
      for (int t = 0; t < K; t++) rf[t] <= '0;
    end else begin
      out_valid <= busy && (cnt == '0);
      for (int t = 0; t < K; t++)
        if (ma_en[t % R] && int'(cnt) == t / R) rf[t] <= ma_out[t % R];
      if (in_valid && in_ready) begin
        xreg <= in_x;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (int'(cnt) == F - 1) busy <= 1'b0;
        else                    cnt  <= cnt + 1'b1;
      end
    end
  end

  // Coefficient bank: written only through the set-up port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < K; t++) coef[t] <= '0;
    end else if (coef_we && int'(coef_addr) < K) begin
      coef[coef_addr] <= coef_data;
    end
  end
endmodule
