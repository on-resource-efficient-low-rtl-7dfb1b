// Testbench of idwt_processor at its defaults (4 MACs, (9,7) synthesis
// pair, 3 levels, 16-bit data).
//  Part 1: three levels of random (x, y) streams, interleaved at random and
//  sent with random gaps; every output pair is compared with a direct model
//  of "upsample by two, filter by L' and H', add" computed per level from the
//  reset coefficients (Q2.14, truncate, saturate).  Large inputs force
//  saturation, which is counted.
//  Part 2: perfect reconstruction.  A random signal is analysed here with the
//  (9,7) analysis pair (even phase, truncated), the approximation and detail
//  go through level 0, and each output must equal the signal 7 samples
//  earlier within 3 LSB.
// Timing check: outputs (one per period) are never closer than q = 4 cycles.
module tb_idwt_processor;
  localparam int NL = 3, NK = 40, NP = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic coef_we = 0; logic [5:0] coef_addr = '0; logic signed [15:0] coef_data = '0;
  logic in_valid = 0, in_ready; logic [1:0] in_level = '0;
  logic signed [15:0] in_approx = '0, in_detail = '0;
  logic out_valid, busy; logic [1:0] out_level;
  logic signed [15:0] out_even, out_odd;

  idwt_processor dut (.*, .busy_o(busy));

  int checks = 0, failures = 0, n_sat = 0;
  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  int lsyn [7] = '{-1057, -667, 6850, 12919, 6850, -667, -1057};
  int hsyn [9] = '{620, 391, -1812, -6183, 13971, -6183, -1812, 391, 620};
  int lan [9] = '{620, -391, -1812, 6183, 13971, 6183, -1812, -391, 620};
  int han [7] = '{1057, -667, -6850, 12919, -6850, -667, 1057};

  int xs [NL][NK+1], ys [NL][NK+1];
  int sent [NL], got [NL];
  int pr_x [NP+1], pr_a [NP/2+1], pr_d [NP/2+1];
  bit pr_mode = 0;
  int last_out = -100;

  function automatic int quant(longint v);
    longint sh;
    sh = v >>> 14;
    if (sh > 32767) begin n_sat++; return 32767; end
    if (sh < -32768) begin n_sat++; return -32768; end
    return int'(sh);
  endfunction
  // reconstructed sample n (n = 2k or 2k+1 after set k) of level l
  function automatic longint syn(int l, int n);
    longint acc;
    acc = 0;
    for (int t = 0; t < 7; t++) if ((n - t) % 2 == 0 && (n - t) / 2 >= 1 && (n - t) >= 0)
      acc += longint'(lsyn[t]) * (pr_mode ? pr_a[(n - t) / 2] : xs[l][(n - t) / 2]);
    for (int t = 0; t < 9; t++) if ((n - t) % 2 == 0 && (n - t) / 2 >= 1 && (n - t) >= 0)
      acc += longint'(hsyn[t]) * (pr_mode ? pr_d[(n - t) / 2] : ys[l][(n - t) / 2]);
    return acc;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    int l, k;
    l = int'(out_level);
    got[l]++;
    k = got[l];
    chk(cyc - last_out >= 4, "periods at least q cycles apart");
    last_out = cyc;
    if (!pr_mode) begin
      chk(int'(out_even) == quant(syn(l, 2*k)), $sformatf("L%0d even #%0d", l, k));
      chk(int'(out_odd) == quant(syn(l, 2*k+1)), $sformatf("L%0d odd #%0d", l, k));
    end else begin
      int e0, e1, r0, r1;
      r0 = (2*k - 7 >= 1) ? pr_x[2*k - 7] : 0;
      r1 = (2*k + 1 - 7 >= 1) ? pr_x[2*k + 1 - 7] : 0;
      e0 = int'(out_even) - r0; e1 = int'(out_odd) - r1;
      chk(e0 >= -3 && e0 <= 3 && e1 >= -3 && e1 <= 3,
          $sformatf("reconstruction #%0d: %0d/%0d vs %0d/%0d", k, out_even, out_odd, r0, r1));
    end
  end

  task automatic send(int l, int a, int d);
    in_valid = 1; in_level = 2'(l); in_approx = 16'(a); in_detail = 16'(d);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int l = 0; l < NL; l++)
      for (int k = 1; k <= NK; k++) begin
        xs[l][k] = int'($urandom_range(0, 16000)) - 8000;
        ys[l][k] = int'($urandom_range(0, 8000)) - 4000;
        if (l == 2 && k > 10 && k < 16) begin xs[l][k] = 32767; ys[l][k] = -32768; end
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Part 1: interleaved levels
    while (sent[0] < NK || sent[1] < NK || sent[2] < NK) begin
      int l;
      l = int'($urandom_range(0, 2));
      if (sent[l] < NK) begin
        sent[l]++;
        send(l, xs[l][sent[l]], ys[l][sent[l]]);
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 6)) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    for (int l = 0; l < NL; l++) chk(got[l] == NK, "outputs per level");
    chk(n_sat > 0, "saturation exercised");
    // Part 2: perfect reconstruction on level 0 after a reset
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    for (int l = 0; l < NL; l++) got[l] = 0;
    for (int n = 1; n <= NP; n++) pr_x[n] = int'($urandom_range(0, 8000)) - 4000;
    for (int k = 1; k <= NP/2; k++) begin
      longint sa, sd;
      sa = 0; sd = 0;
      for (int t = 0; t < 9; t++) if (2*k - t >= 1) sa += longint'(lan[t]) * pr_x[2*k - t];
      for (int t = 0; t < 7; t++) if (2*k - t >= 1) sd += longint'(han[t]) * pr_x[2*k - t];
      pr_a[k] = int'(sa >>> 14); pr_d[k] = int'(sd >>> 14);
    end
    pr_mode = 1;
    for (int k = 1; k <= NP/2; k++) send(0, pr_a[k], pr_d[k]);
    repeat (10) @(negedge clk);
    chk(got[0] == NP/2, "reconstruction output count");
    $display("saturations=%0d", n_sat);
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
