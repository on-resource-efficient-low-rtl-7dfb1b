// Testbench of dwt_controller with r = 3 MACs and the (9,7) filter pair.
// 1. The per-cycle table it issues over one scheduling period (q = 6) is
//    compared with the worked example of the scheduling matrices for this
//    case (coefficient, buffer, destination and feedback register of every
//    MAC in every cycle).
// 2. With input always available, the octave of each period must follow the
//    ASAP rule a(k)/b(k) (computed here from its recurrence), periods must be
//    exactly q cycles apart, and load_in/load_oct/store_half must match.
// 3. With the input withheld, the sequencer must stall and issue nothing.
module tb_dwt_controller;
  import dwt_pkg::*;
  localparam int R = 3, M = 9, N = 7, S = 3, Q = 6;
  logic clk = 0, rst_n = 0, pair_avail = 0;
  logic run, load_in, load_oct, store_half, emit, stall;
  logic [1:0] stage; logic [7:0] row;
  mac_op_t ops [R];
  int checks = 0, failures = 0;
  int stalls_seen = 0;

  dwt_controller #(.NUM_MAC(R), .M(M), .N(N), .S(S)) dut (
    .clk, .rst_n, .pair_avail_i(pair_avail), .run_o(run), .stage_o(stage), .row_o(row),
    .ops_o(ops), .load_in_o(load_in), .load_oct_o(load_oct), .store_half_o(store_half),
    .emit_o(emit), .stall_o(stall));

  always #5 clk = ~clk;

  // Expected matrices: coefficient L_i = i, H_i = 100+i, 0 = idle;
  // registers 1-based, 0 = none.  B: 1 = older sample, 2 = newer.
  int cm  [Q][R] = '{'{2,4,6}, '{8,102,104}, '{106,1,3}, '{5,7,9}, '{101,103,105}, '{107,0,0}};
  int dm  [Q][R] = '{'{1,1,1}, '{1,1,1}, '{1,2,2}, '{2,2,2}, '{2,2,2}, '{2,0,0}};
  int acc [Q][R] = '{'{2,4,6}, '{8,11,13}, '{15,1,3}, '{5,7,9}, '{10,12,14}, '{16,0,0}};
  int fbm [Q][R] = '{'{3,5,7}, '{9,12,14}, '{16,2,4}, '{6,8,0}, '{11,13,15}, '{0,0,0}};

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  int a_prev, b_prev, a_k, b_k;
  longint cyc = 0, last_emit = -1;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(stall && !run, "idle before input");
    pair_avail = 1;
    @(negedge clk);
    // Part 1: first period is octave 0, rows 0..5
    for (int i = 0; i < Q; i++) begin
      chk(run && row == 8'(i) && stage == 0, $sformatf("row %0d running", i));
      for (int j = 0; j < R; j++) begin
        int c, d, a, f;
        c = !ops[j].en ? 0 : (ops[j].coef < M ? ops[j].coef + 1 : 100 + ops[j].coef - M + 1);
        d = !ops[j].en ? 0 : (ops[j].b2 ? 2 : 1);
        a = !ops[j].en ? 0 : ops[j].acc + 1;
        f = (!ops[j].en || !ops[j].fb_en) ? 0 : ops[j].fb + 1;
        chk(c == cm[i][j],  $sformatf("CM(%0d,%0d)=%0d exp %0d", i, j, c, cm[i][j]));
        chk(d == dm[i][j],  $sformatf("DM(%0d,%0d)=%0d exp %0d", i, j, d, dm[i][j]));
        chk(a == acc[i][j], $sformatf("AccM(%0d,%0d)=%0d exp %0d", i, j, a, acc[i][j]));
        chk(f == fbm[i][j], $sformatf("FbM(%0d,%0d)=%0d exp %0d", i, j, f, fbm[i][j]));
      end
      if (i < Q - 1) @(negedge clk);
    end
    // Part 2: octave sequence over 40 periods (this negedge is the end of k=1)
    a_prev = 0; b_prev = 2;
    for (int k = 1; k <= 40; k++) begin
      // at the last row of period k
      chk(emit && int'(stage) == a_prev, $sformatf("period %0d octave %0d exp %0d", k, stage, a_prev));
      if (k > 1) chk(cyc - last_emit == Q, $sformatf("period length %0d", cyc - last_emit));
      last_emit = cyc;
      // next period by the recurrence of the document
      if (a_prev == S - 1) begin a_k = 0; b_k = b_prev * (1 << a_prev) + 2; end
      else if (b_prev % 4 == 0) begin a_k = a_prev + 1; b_k = b_prev / 2; end
      else begin a_k = 0; b_k = b_prev * (1 << a_prev) + 2; end
      chk(load_oct == (a_k == a_prev + 1), $sformatf("load_oct at k=%0d", k));
      chk(load_in == (a_k == 0), $sformatf("load_in at k=%0d", k));
      chk(store_half == (a_k == 0 && a_prev < S - 1), $sformatf("store_half at k=%0d", k));
      a_prev = a_k; b_prev = b_k;
      repeat (Q) @(negedge clk);
    end
    // Part 3: withhold input; the current octave-0 or higher periods drain,
    // then the controller must stall.
    pair_avail = 0;
    repeat (4 * Q) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      chk(stall && !run && !emit, "stall without input");
      for (int j = 0; j < R; j++) chk(!ops[j].en, "no MAC enabled while stalled");
      if (stall) stalls_seen++;
      @(negedge clk);
    end
    pair_avail = 1;
    @(negedge clk);
    chk(run && stage == 0 && row == 0, "restart after stall");
    chk(stalls_seen > 0, "stall observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
