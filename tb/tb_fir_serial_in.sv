// Self-checking testbench of fir_serial_in at the document's size (33 taps,
// 8-bit samples, 16-bit coefficients, 3 MAs, folding factor 11).
// Loads random coefficients, streams random samples (also the extreme
// values), and compares every output with a direct-form convolution computed
// here.  It also checks that outputs come exactly every F = 11 cycles under a
// continuous input stream and that the first one appears 11 cycle(s) after
// its sample is taken; gaps in the input stream are exercised too.
module tb_fir_serial_in;
  localparam int K = 33, R = 3, XW = 8, HW = 16, W = 30, F = 11;
  localparam int NS = 300;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0; logic [5:0] coef_addr = '0; logic signed [HW-1:0] coef_data = '0;
  logic in_valid = 0, in_ready; logic signed [XW-1:0] in_x = '0;
  logic out_valid; logic signed [W-1:0] out_y;
  int checks = 0, failures = 0;
  logic signed [HW-1:0] h [K];
  logic signed [XW-1:0] xs [NS];
  longint cyc = 0, t_in0 = -1, t_last_out = -1;
  int nout = 0;

  fir_serial_in dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint ref_y(int n);
    longint acc = 0;
    for (int i = 0; i < K; i++) if (n - i >= 0) acc += longint'(h[i]) * longint'(xs[n-i]);
    return acc;
  endfunction

  // Output monitor (samples at the falling edge, away from the updates)
  always @(negedge clk) if (rst_n && out_valid) begin
    longint e;
    e = ref_y(nout);
    checks++;
    if (longint'(out_y) != e) begin
      failures++;
      if (failures < 10) $display("y[%0d] = %0d expected %0d", nout, out_y, e);
    end
    if (nout == 0) begin
      checks++;
      if (cyc - t_in0 != 11) begin failures++; $display("latency %0d", cyc - t_in0); end
    end else if (nout < 200) begin
      checks++;   // continuous-input part: one output per F cycles
      if (cyc - t_last_out != F) begin failures++; $display("output spacing %0d at %0d", cyc - t_last_out, nout); end
    end
    t_last_out = cyc;
    nout++;
  end

  initial begin
    for (int i = 0; i < K; i++) h[i] = HW'($urandom);
    h[0] = -16'sd32768; h[K-1] = 16'sd32767;
    for (int n = 0; n < NS; n++) xs[n] = XW'($urandom);
    xs[1] = -8'sd128; xs[2] = -8'sd128; xs[3] = 8'sd127;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < K; i++) begin
      coef_we <= 1; coef_addr <= 6'(i); coef_data <= h[i];
      @(posedge clk);
    end
    coef_we <= 0;
    @(negedge clk);
    coef_we = 0;
    // Drive at the falling edge; a sample is taken at the next rising edge
    // when in_ready is high.
    for (int n = 0; n < NS; n++) begin
      in_valid = 1; in_x = xs[n];
      while (!in_ready) @(negedge clk);
      if (n == 0) t_in0 = cyc + 1;
      @(negedge clk);
      in_valid = 0;
      if (n >= 200 && ($urandom % 3 == 0)) repeat ($urandom % 20) @(negedge clk);
    end
    repeat (3 * F) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("got %0d outputs, expected %0d", nout, NS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
