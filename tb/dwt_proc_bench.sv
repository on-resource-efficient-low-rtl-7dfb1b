// Checking bench for dwt_processor with r MACs (used by tb_dwt_processor).
// A reference model here computes the three-octave (9,7) transform directly
// as decimated convolutions, a_{s+1}(k) = Q(sum_t L_{t+1} a_s(2k-t)) and
// d_{s+1}(k) = Q(sum_t H_{t+1} a_s(2k-t)), with Q = shift right by 14 and
// saturate to 16 bits, and every detail and final approximation of the
// processor is compared with it.  Inputs include full-scale samples so that
// saturation happens.  Timing checks, with input always offered: periods of
// q = ceil(16/r) cycles back to back, one level-3 output every (2^3-1) q
// cycles.  After the input ends the processor must stall.  The bench has its
// own clock; done rises when it has finished, with its counts.
module dwt_proc_bench #(
  parameter int R = 4
) (
  output bit done,
  output int checks,
  output int failures
);
  initial begin done = 0; checks = 0; failures = 0; end
  localparam int S = 3, Q = (16 + R - 1) / R, NIN = 256, DW = 16;
  logic clk = 0, rst_n = 0;
  logic coef_we = 0; logic [5:0] coef_addr = '0; logic signed [15:0] coef_data = '0;
  logic in_valid = 0, in_ready; logic signed [DW-1:0] in_data = '0;
  logic out_valid, out_approx_valid, busy, stall;
  logic [1:0] out_level;
  logic signed [DW-1:0] out_detail, out_approx;
  int sat_events = 0, stall_cycles = 0;

  dwt_processor #(.NUM_MAC(R)) dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_data, .in_valid, .in_ready,
    .in_data, .out_valid, .out_level, .out_detail, .out_approx_valid, .out_approx,
    .busy_o(busy), .stall_o(stall));

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int lp [9] = '{620, -391, -1812, 6183, 13971, 6183, -1812, -391, 620};
  int hp [7] = '{1057, -667, -6850, 12919, -6850, -667, 1057};
  int a [S+1][NIN+1];     // a[s][j], j = 1..
  int d [S+1][NIN+1];
  int na [S+1];

  function automatic int quant(longint v);
    longint sh;
    sh = v >>> 14;
    if (sh > 32767) begin sat_events++; return 32767; end
    if (sh < -32768) begin sat_events++; return -32768; end
    return int'(sh);
  endfunction

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL (r=%0d): %s", R, what); end
  endfunction

  int got [S+1];
  int got_a;
  longint last_top = -1, last_emit = -1;
  bit continuous = 1;
  always @(negedge clk) if (rst_n) begin
    if (stall) stall_cycles++;
    if (out_valid) begin
      int l;
      l = int'(out_level);
      got[l]++;
      chk(l >= 1 && l <= S, "level range");
      if (l >= 1 && l <= S)
        chk(out_detail == 16'(d[l][got[l]]),
            $sformatf("detail level %0d #%0d = %0d exp %0d", l, got[l], out_detail, d[l][got[l]]));
      chk(out_approx_valid == (l == S), "approx valid only at last level");
      if (continuous && last_emit >= 0) chk(cyc - last_emit == Q, $sformatf("period spacing %0d", cyc - last_emit));
      last_emit = cyc;
      if (out_approx_valid) begin
        got_a++;
        chk(out_approx == 16'(a[S][got_a]),
            $sformatf("approx #%0d = %0d exp %0d", got_a, out_approx, a[S][got_a]));
        if (continuous && last_top >= 0)
          chk(cyc - last_top == (2 ** S - 1) * Q, $sformatf("level-%0d spacing %0d", S, cyc - last_top));
        last_top = cyc;
      end
    end
  end

  initial begin
    // stimulus and reference
    for (int j = 1; j <= NIN; j++) begin
      a[0][j] = int'($urandom_range(0, 8000)) - 4000;
      if (j % 37 == 0) a[0][j] = 32767;
      if (j % 41 == 0) a[0][j] = -32768;
    end
    for (int j = 100; j < 110; j++) a[0][j] = 32767;   // sustained full scale
    na[0] = NIN;
    for (int s = 0; s < S; s++) begin
      na[s+1] = na[s] / 2;
      for (int k = 1; k <= na[s+1]; k++) begin
        longint sl, sh;
        sl = 0; sh = 0;
        for (int t = 0; t < 9; t++) if (2*k - t >= 1) sl += longint'(lp[t]) * a[s][2*k - t];
        for (int t = 0; t < 7; t++) if (2*k - t >= 1) sh += longint'(hp[t]) * a[s][2*k - t];
        a[s+1][k] = quant(sl);
        d[s+1][k] = quant(sh);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 1; j <= NIN; j++) begin
      in_valid = 1; in_data = 16'(a[0][j]);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    continuous = 0;
    repeat (50) @(negedge clk);
    chk(got[1] == NIN / 2 && got[2] == NIN / 4 && got[3] == NIN / 8 && got_a == NIN / 8,
        $sformatf("output counts %0d %0d %0d %0d", got[1], got[2], got[3], got_a));
    chk(sat_events > 0, "saturation exercised");
    chk(stall_cycles > 0 && stall && !busy, "stall after input ends");
    $display("r=%0d: checks=%0d failures=%0d", R, checks, failures);
    done = 1;
  end

endmodule
