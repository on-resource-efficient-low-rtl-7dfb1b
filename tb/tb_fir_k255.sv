// Testbench of the two folded FIR filters at the long-filter size used to
// compare folding styles: 255 taps, 8-bit samples, 16-bit coefficients.
// Two folding factors are run, f = 17 (15 multiplier-adders) and f = 51
// (5 multiplier-adders); each has a parallel-in and a serial-in filter, all
// four fed with the same random coefficients and samples.  Every output is
// compared with a direct-form convolution, and outputs under a continuous
// stream must come exactly every f cycles.
module tb_fir_k255;
  localparam int K = 255, XW = 8, HW = 16, W = 32, NS = 120;
  localparam int NC = 2;
  localparam int RS [NC] = '{15, 5};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic coef_we = 0; logic [7:0] coef_addr = '0; logic signed [HW-1:0] coef_data = '0;
  logic signed [HW-1:0] h [K];
  logic signed [XW-1:0] xs [NS];
  int checks = 0, failures = 0;
  bit go = 0;
  int done_cnt = 0;

  function automatic longint ref_y(int n);
    longint acc;
    acc = 0;
    for (int i = 0; i < K; i++) if (n - i >= 0) acc += longint'(h[i]) * longint'(xs[n-i]);
    return acc;
  endfunction

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int R = RS[c];
    localparam int F = K / R;
    for (genvar s = 0; s < 2; s++) begin : g_style
      logic in_valid = 0, in_ready, out_valid;
      logic signed [XW-1:0] in_x = '0;
      logic signed [W-1:0] out_y;
      int nout = 0;
      longint t_last = -1;
      if (s == 0) begin : g_p
        fir_parallel_in #(.K(K), .R(R), .XW(XW), .HW(HW), .W(W)) dut (
          .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
          .in_valid, .in_ready, .in_x, .out_valid, .out_y);
      end else begin : g_s
        fir_serial_in #(.K(K), .R(R), .XW(XW), .HW(HW), .W(W)) dut (
          .clk, .rst_n, .coef_we, .coef_addr, .coef_data,
          .in_valid, .in_ready, .in_x, .out_valid, .out_y);
      end
      always @(negedge clk) if (rst_n && out_valid) begin
        checks++;
        if (longint'(out_y) != ref_y(nout)) begin
          failures++;
          if (failures < 10) $display("f=%0d style %0d: y[%0d] = %0d expected %0d", F, s, nout, out_y, ref_y(nout));
        end
        if (nout > 0) begin
          checks++;
          if (cyc - t_last != F) begin failures++; $display("f=%0d style %0d: spacing %0d", F, s, cyc - t_last); end
        end
        t_last = cyc;
        nout++;
      end
      initial begin
        wait (go);
        @(negedge clk);
        for (int n = 0; n < NS; n++) begin
          in_valid = 1; in_x = xs[n];
          while (!in_ready) @(negedge clk);
          @(negedge clk);
        end
        in_valid = 0;
        repeat (2 * F + 2) @(negedge clk);
        checks++;
        if (nout != NS) begin failures++; $display("f=%0d style %0d: %0d outputs", F, s, nout); end
        done_cnt++;
      end
    end
  end

  initial begin
    for (int i = 0; i < K; i++) h[i] = HW'($urandom);
    for (int n = 0; n < NS; n++) xs[n] = XW'($urandom);
    xs[0] = -8'sd128; h[K-1] = -16'sd32768;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      coef_we = 1; coef_addr = 8'(i); coef_data = h[i];
      @(negedge clk);
    end
    coef_we = 0;
    go = 1;
    wait (done_cnt == 2 * NC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
