// Testbench of turbo_decoder (block length reduced to 64 bits for speed)
// with the behavioural SISO stand-in.  Packet sequence and expected outcome,
// worked out by hand from the stand-in's rules:
//   1 solvable, fresh      -> decoded after 6 SISO passes, zero a-priori start
//   2 unsolvable           -> given up after 7 passes, resend requested
//   3 same packet resent   -> a-priori of the first SISO pass all non-zero
//                             (state reuse), decoded in fewer passes than 1
//   4 marginal, fresh      -> iteration limit (16 passes), zero a-priori start
//   5 solvable, flagged as a resend but nothing was kept -> zero start
// Also checked: decoded hard decisions equal the true bits, SISO 1 and 2
// alternate, and the give-up / terminate / limit paths each occur.
module tb_turbo_decoder;
  import turbo_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic pkt_start = 0, pkt_resend = 0, busy, done, resend_req, reused, dec_bit;
  result_e result;
  logic [7:0] passes, mean;
  logic [5:0] dec_addr = '0;
  logic siso_start, siso_sel, siso_done, ext_valid, hard;
  logic [5:0] apri_addr, ext_addr;
  logic signed [7:0] apri, ext;
  logic [1:0] mode = 0;
  int nz;
  int checks = 0, failures = 0;
  int n_dec = 0, n_gu = 0, n_max = 0, n_reuse = 0, n_resend_req = 0;

  turbo_decoder #(.BLK_LEN(N)) dut (
    .clk, .rst_n, .pkt_start_i(pkt_start), .pkt_resend_i(pkt_resend), .busy_o(busy),
    .done_o(done), .result_o(result), .passes_o(passes), .resend_req_o(resend_req),
    .reused_o(reused), .dec_raddr_i(dec_addr), .dec_rdata_o(dec_bit), .egu_mean_o(mean),
    .siso_start_o(siso_start), .siso_sel_o(siso_sel), .siso_done_i(siso_done),
    .siso_apri_addr_i(apri_addr), .siso_apri_o(apri), .siso_ext_valid_i(ext_valid),
    .siso_ext_addr_i(ext_addr), .siso_ext_i(ext), .siso_hard_i(hard));

  siso_model #(.N(N), .W(8)) u_siso (
    .clk, .start_i(siso_start), .sel_i(siso_sel), .mode_i(mode), .apri_addr_o(apri_addr),
    .apri_i(apri), .ext_valid_o(ext_valid), .ext_addr_o(ext_addr), .ext_o(ext),
    .hard_o(hard), .done_o(siso_done), .nonzero_apri_o(nz));

  always #5 clk = ~clk;

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // SISO 1 and SISO 2 must alternate, starting with SISO 1
  bit expect_sel;
  int first_nz;
  int pass_in_pkt;
  always @(posedge clk) if (rst_n) begin
    if (siso_start) begin
      chk(siso_sel == expect_sel, "SISO order");
      expect_sel = !expect_sel;
    end
    if (resend_req) n_resend_req++;
  end
  // a-priori non-zero count of the first SISO-1 pass of each packet
  always @(posedge clk) if (siso_done) begin
    if (pass_in_pkt == 0) first_nz = nz;
    pass_in_pkt++;
  end

  task automatic packet(input logic [1:0] m, input bit rs, output result_e r, output int p);
    @(negedge clk);
    mode = m; pkt_resend = rs; pkt_start = 1; expect_sel = 0; pass_in_pkt = 0; first_nz = -1;
    @(negedge clk);
    pkt_start = 0;
    while (!done) @(negedge clk);
    r = result; p = int'(passes);
    case (r) ST_DECODED: n_dec++; ST_GAVE_UP: n_gu++; ST_MAX_ITER: n_max++; default: ; endcase
    if (reused) n_reuse++;
  endtask

  result_e r; int p, p_fresh;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    packet(2'd1, 0, r, p);
    chk(r == ST_DECODED && p == 6, $sformatf("pkt1 result %0d passes %0d", r, p));
    chk(first_nz == 0 && !reused, "pkt1 starts from zero a-priori");
    p_fresh = p;
    for (int a = 0; a < N; a++) begin
      dec_addr = 6'(a); #1;
      chk(dec_bit == bit'(((a * 7 + 3) >> 2) & 1), $sformatf("decoded bit %0d", a));
    end
    packet(2'd0, 0, r, p);
    chk(r == ST_GAVE_UP && p == 7, $sformatf("pkt2 result %0d passes %0d", r, p));
    chk(n_resend_req == 1, "resend requested on give-up");
    packet(2'd1, 1, r, p);
    chk(r == ST_DECODED && reused, $sformatf("pkt3 result %0d reused %0d", r, reused));
    chk(first_nz == N, $sformatf("pkt3 first pass a-priori non-zero %0d of %0d", first_nz, N));
    chk(p < p_fresh, $sformatf("state reuse saves passes: %0d vs %0d", p, p_fresh));
    packet(2'd2, 0, r, p);
    chk(r == ST_MAX_ITER && p == 16, $sformatf("pkt4 result %0d passes %0d", r, p));
    chk(first_nz == 0 && !reused, "pkt4 starts from zero a-priori");
    packet(2'd1, 1, r, p);
    chk(r == ST_DECODED && !reused && first_nz == 0, "pkt5 nothing to reuse");
    chk(n_dec == 3 && n_gu == 1 && n_max == 1 && n_reuse == 1, "every path taken");
    chk(n_resend_req == 1, "single resend request");
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
