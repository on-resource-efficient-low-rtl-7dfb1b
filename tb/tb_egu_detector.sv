// Testbench of egu_detector (block length 32 for speed, thresholds at their
// defaults: rise of 4, three passes).  Each pass streams 32 extrinsic values
// whose magnitudes are chosen so the mean is known exactly (random signs,
// including -128); the reference rule is re-computed here: a pass does not
// rise if its mean < peak + 4, and three such passes in a row give up.
// Sequences: a steadily rising packet (never gives up), an oscillating one
// (gives up at its fourth pass), a rise that resets the run, and a clear in
// between packets.
module tb_egu_detector;
  localparam int N = 32, TH = 4, OSC = 3;
  logic clk = 0, rst_n = 0, clear = 0, le_valid = 0, pass_done = 0;
  logic signed [7:0] le = '0;
  logic decision, give_up;
  logic [7:0] mean;
  int checks = 0, failures = 0, n_giveup = 0;
  int peak = 0, run = 0;

  egu_detector #(.BLK_LEN(N)) dut (.clk, .rst_n, .clear_i(clear), .le_valid_i(le_valid),
    .le_i(le), .pass_done_i(pass_done), .decision_o(decision), .give_up_o(give_up), .mean_o(mean));

  always #5 clk = ~clk;

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // one pass with mean magnitude mu (0..128): half the values mu-d, half mu+d
  task automatic pass(int mu);
    int d, mag, exp_mean;
    bit exp_gu;
    d = (mu >= 3 && mu <= 125) ? 3 : 0;
    for (int k = 0; k < N; k++) begin
      mag = (k % 2) ? mu + d : mu - d;
      le_valid = 1;
      le = ($urandom & 1) ? 8'(mag) : 8'(-mag);
      if (mag == 128) le = -8'sd128;
      @(negedge clk);
    end
    le_valid = 0; pass_done = 1;
    @(negedge clk);
    pass_done = 0;
    exp_mean = mu;
    if (exp_mean < peak + TH) run++; else run = 0;
    exp_gu = (run >= OSC);
    if (exp_mean > peak) peak = exp_mean;
    chk(decision, "decision pulse");
    chk(int'(mean) == exp_mean, $sformatf("mean %0d exp %0d", mean, exp_mean));
    chk(give_up == exp_gu, $sformatf("give_up %0d exp %0d (mean %0d)", give_up, exp_gu, mu));
    if (give_up) n_giveup++;
    @(negedge clk);
    chk(!decision, "single pulse");
  endtask

  task automatic new_packet();
    clear = 1; @(negedge clk); clear = 0;
    peak = 0; run = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    new_packet();
    // rising packet
    pass(5); pass(12); pass(20); pass(40); pass(80); pass(128);
    new_packet();
    // oscillating packet: gives up at the fourth pass
    pass(9); pass(11); pass(8); pass(12);
    new_packet();
    // oscillation broken by a rise, then oscillation again
    pass(10); pass(12); pass(13); pass(20); pass(21); pass(19); pass(22);
    chk(n_giveup >= 2, "give-up observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
