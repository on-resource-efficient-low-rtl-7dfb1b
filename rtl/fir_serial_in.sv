// Serial-in folded FIR filter.
//
// The K-tap transfer function is split into R short F-tap filters,
//   H(z) = sum_{i=0..R-1} z^{-F i} P_i(z),  P_i(z) = sum_{j=0..F-1} h_{F i+j} z^{-j},
// with F = K/R.  PE i evaluates P_i serially: in cycle j of a sample period
// it multiplies the window sample x(n-j) by h_{F i+j} and accumulates; the
// accumulator restarts at j = 0 (the periodic RST of the architecture) and
// its final value is latched at the end of the period.  The coefficients of
// each PE circulate in a cyclic shift register and the F-sample input window
// circulates the same way, so every PE reads position 0 only ("serial-in").
// The latched short-filter results are combined through F-stage delay lines
// (the fD blocks) clocked once per sample:
//   s_{R-1}(n) = p_{R-1}(n),  s_i(n) = p_i(n) + s_{i+1}(n-F),  y(n) = s_0(n).
//
// The F-word input window is this design's reading of how the PEs obtain
// x(n-j); the document's register count does not list it.
//
// Interface (this design's choice):
//   coef_we/coef_addr/coef_data : write h_{coef_addr}, 0-based; use while
//                                 idle (the shift registers are then aligned).
//   in_valid/in_ready/in_x      : one sample per F cycles.
//   out_valid/out_y             : out_valid pulses F cycles after a sample
//                                 is taken; y(n) at full precision.
// Requires R to divide K.
module fir_serial_in #(
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
  localparam int unsigned F  = K / R;
  localparam int unsigned CW = (F > 1) ? $clog2(F) : 1;

  logic signed [HW-1:0] creg  [R][F];   // cyclic coefficient shift registers
  logic signed [XW-1:0] xwin  [F];      // circulating input window
  logic signed [W-1:0]  acc   [R];      // accumulators
  logic signed [W-1:0]  latch [R];      // latched short-filter results
  logic signed [W-1:0]  dline [R][F];   // fD delay lines (entry R-1 unused)
  logic signed [W-1:0]  s     [R];
  logic signed [W-1:0]  ma_out[R];
  logic [CW-1:0]        cnt;
  logic                 busy;

  for (genvar i = 0; i < R; i++) begin : g_pe
    fir_ma #(.XW(XW), .HW(HW), .W(W)) u_ma (
      .x_i(xwin[0]), .h_i(creg[i][0]),
      .add_i((cnt == '0) ? '0 : acc[i]), .acc_o(ma_out[i]));
  end

  always_comb begin
    s[R-1] = latch[R-1];
    for (int i = int'(R) - 2; i >= 0; i--) s[i] = latch[i] + dline[i][F-1];
  end

  // Window after this cycle's rotation (unchanged when idle).
  logic signed [XW-1:0] win [F];
  always_comb
    for (int j = 0; j < F; j++) win[j] = busy ? xwin[(j + 1) % F] : xwin[j];

  assign in_ready = !busy || (int'(cnt) == F - 1);
  assign out_y    = s[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int j = 0; j < F; j++) xwin[j] <= '0;
      for (int i = 0; i < R; i++) begin
        acc[i]   <= '0;
        latch[i] <= '0;
        for (int j = 0; j < F; j++) dline[i][j] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        for (int i = 0; i < R; i++) acc[i] <= ma_out[i];
        if (int'(cnt) == F - 1) begin
          // End of period: shift the fD lines, latch the short-filter sums.
          for (int i = 0; i < R - 1; i++) begin
            dline[i][0] <= s[i+1];
            for (int j = 1; j < F; j++) dline[i][j] <= dline[i][j-1];
          end
          for (int i = 0; i < R; i++) latch[i] <= ma_out[i];
          out_valid <= 1'b1;
          busy      <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        xwin[0] <= in_x;
        for (int j = 1; j < F; j++) xwin[j] <= win[j-1];
        cnt  <= '0;
        busy <= 1'b1;
      end else begin
        for (int j = 0; j < F; j++) xwin[j] <= win[j];
      end
    end
  end

  // Coefficients rotate by one position per busy cycle, F per sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < F; j++) creg[i][j] <= '0;
    end else if (busy) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < F; j++) creg[i][j] <= creg[i][(j + 1) % F];
    end else if (coef_we && int'(coef_addr) < K) begin
      creg[int'(coef_addr) / F][int'(coef_addr) % F] <= coef_data;
    end
  end
endmodule
