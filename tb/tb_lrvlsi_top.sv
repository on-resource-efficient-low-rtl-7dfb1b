// End-to-end testbench of lrvlsi_top at its default sizes (no parameter
// overrides): the three engines run concurrently.
//  * DWT: 128 samples through the 3-octave (9,7) transform with the reset
//    coefficients; every detail and final approximation is compared with a
//    direct decimated-convolution model (Q2.14, truncate, saturate).
//  * IDWT: the level-1 approximation and detail of the same signal (from the
//    reference model) go through the inverse processor; every output pair is
//    compared with a direct upsample-filter-add model, and away from the
//    saturated stretch it must reconstruct the input 7 samples late (3 LSB).
//  * FIR: the same 120 samples and random 33 coefficients go to both folded
//    filters; every output is compared with a direct-form convolution.
//  * Turbo control: four 1024-bit packets through the behavioural SISO
//    stand-in: solvable, unsolvable (give-up), resend (state reuse),
//    marginal (iteration limit).
// Mechanisms counted, each must occur: DWT input stall, IDWT reconstruction, octave-to-octave
// periods, saturation, input back-pressure on DWT and both FIRs, turbo early
// termination, early give-up, state reuse and iteration limit.
module tb_lrvlsi_top;
  import turbo_pkg::*;
  localparam int NIN = 128, NF = 120, K = 33, NB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dwt_coef_we = 0; logic [5:0] dwt_coef_addr = '0; logic signed [15:0] dwt_coef_data = '0;
  logic dwt_in_valid = 0, dwt_in_ready; logic signed [15:0] dwt_in_data = '0;
  logic dwt_out_valid, dwt_out_approx_valid, dwt_busy, dwt_stall; logic [1:0] dwt_out_level;
  logic signed [15:0] dwt_out_detail, dwt_out_approx;
  logic idwt_coef_we = 0; logic [5:0] idwt_coef_addr = '0; logic signed [15:0] idwt_coef_data = '0;
  logic idwt_in_valid = 0, idwt_in_ready, idwt_out_valid, idwt_busy;
  logic [1:0] idwt_in_level = '0, idwt_out_level;
  logic signed [15:0] idwt_in_approx = '0, idwt_in_detail = '0, idwt_out_even, idwt_out_odd;
  logic fp_coef_we = 0, fs_coef_we = 0; logic [5:0] fp_coef_addr = '0, fs_coef_addr = '0;
  logic signed [15:0] fp_coef_data = '0, fs_coef_data = '0;
  logic fp_in_valid = 0, fs_in_valid = 0, fp_in_ready, fs_in_ready;
  logic signed [7:0] fp_in_x = '0, fs_in_x = '0;
  logic fp_out_valid, fs_out_valid; logic signed [29:0] fp_out_y, fs_out_y;
  logic td_pkt_start = 0, td_pkt_resend = 0, td_busy, td_done, td_resend_req, td_reused, td_dec_rdata;
  result_e td_result; logic [7:0] td_passes, td_egu_mean;
  logic [9:0] td_dec_raddr = '0;
  logic td_siso_start, td_siso_sel, td_siso_done, td_siso_ext_valid, td_siso_hard;
  logic [9:0] td_siso_apri_addr, td_siso_ext_addr;
  logic signed [7:0] td_siso_apri, td_siso_ext;
  logic [1:0] mode = 0; int nz;

  lrvlsi_top dut (.*);

  siso_model #(.N(NB), .W(8)) u_siso (
    .clk, .start_i(td_siso_start), .sel_i(td_siso_sel), .mode_i(mode),
    .apri_addr_o(td_siso_apri_addr), .apri_i(td_siso_apri), .ext_valid_o(td_siso_ext_valid),
    .ext_addr_o(td_siso_ext_addr), .ext_o(td_siso_ext), .hard_o(td_siso_hard),
    .done_o(td_siso_done), .nonzero_apri_o(nz));

  int checks = 0, failures = 0;
  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endfunction

  // mechanism counters
  int n_dwt_stall = 0, n_dwt_up = 0, n_sat = 0, n_dwt_bp = 0, n_fp_bp = 0, n_fs_bp = 0;
  int n_recon = 0, n_idwt_bp = 0, nid = 0;
  int n_dec = 0, n_gu = 0, n_reuse = 0, n_max = 0;

  // ---------------- DWT reference
  int lp [9] = '{620, -391, -1812, 6183, 13971, 6183, -1812, -391, 620};
  int hp [7] = '{1057, -667, -6850, 12919, -6850, -667, 1057};
  int a [4][NIN+1], d [4][NIN+1];
  function automatic int quant(longint v);
    longint sh;
    sh = v >>> 14;
    if (sh > 32767) begin n_sat++; return 32767; end
    if (sh < -32768) begin n_sat++; return -32768; end
    return int'(sh);
  endfunction
  int got [4]; int got_a = 0;
  always @(negedge clk) if (rst_n) begin
    if (dwt_stall) n_dwt_stall++;
    if (dwt_in_valid && !dwt_in_ready) n_dwt_bp++;
    if (fp_in_valid && !fp_in_ready) n_fp_bp++;
    if (idwt_in_valid && !idwt_in_ready) n_idwt_bp++;
    if (fs_in_valid && !fs_in_ready) n_fs_bp++;
    if (dwt_out_valid) begin
      int l;
      l = int'(dwt_out_level);
      if (l > 1) n_dwt_up++;
      got[l]++;
      chk(dwt_out_detail == 16'(d[l][got[l]]), $sformatf("DWT detail L%0d #%0d", l, got[l]));
      if (dwt_out_approx_valid) begin
        got_a++;
        chk(dwt_out_approx == 16'(a[3][got_a]), $sformatf("DWT approx #%0d", got_a));
      end
    end
  end

  // ---------------- IDWT reference (synthesis pair L' = -H(-z), H' = L(-z))
  int lsyn [7] = '{-1057, -667, 6850, 12919, 6850, -667, -1057};
  int hsyn [9] = '{620, 391, -1812, -6183, 13971, -6183, -1812, 391, 620};
  function automatic int syn(int n);
    longint acc;
    acc = 0;
    for (int t = 0; t < 7; t++) if ((n - t) % 2 == 0 && (n - t) >= 2) acc += longint'(lsyn[t]) * a[1][(n - t) / 2];
    for (int t = 0; t < 9; t++) if ((n - t) % 2 == 0 && (n - t) >= 2) acc += longint'(hsyn[t]) * d[1][(n - t) / 2];
    acc = acc >>> 14;
    return (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
  endfunction
  always @(negedge clk) if (rst_n && idwt_out_valid) begin
    int n;
    nid++;
    n = 2 * nid;
    chk(idwt_out_level == 2'd0, "IDWT level");
    chk(int'(idwt_out_even) == syn(n) && int'(idwt_out_odd) == syn(n + 1), $sformatf("IDWT pair #%0d", nid));
    for (int e = 0; e < 2; e++)
      if (n + e - 7 >= 1 && (n + e - 7 < 45 || n + e - 7 > 85)) begin
        int err;
        err = int'(e ? idwt_out_odd : idwt_out_even) - a[0][n + e - 7];
        chk(err >= -3 && err <= 3, $sformatf("reconstruction of sample %0d", n + e - 7));
        n_recon++;
      end
  end

  // ---------------- FIR reference
  logic signed [15:0] h [K];
  logic signed [7:0] xs [NF];
  int nfp = 0, nfs = 0;
  function automatic longint fir_ref(int n);
    longint acc;
    acc = 0;
    for (int i = 0; i < K; i++) if (n - i >= 0) acc += longint'(h[i]) * longint'(xs[n-i]);
    return acc;
  endfunction
  always @(negedge clk) if (rst_n) begin
    if (fp_out_valid) begin chk(longint'(fp_out_y) == fir_ref(nfp), $sformatf("parallel-in y[%0d]", nfp)); nfp++; end
    if (fs_out_valid) begin chk(longint'(fs_out_y) == fir_ref(nfs), $sformatf("serial-in y[%0d]", nfs)); nfs++; end
  end

  task automatic td_packet(input logic [1:0] m, input bit rs, input result_e exp_r, input bit exp_reuse);
    @(negedge clk);
    mode = m; td_pkt_resend = rs; td_pkt_start = 1;
    @(negedge clk);
    td_pkt_start = 0;
    while (!td_done) @(negedge clk);
    chk(td_result == exp_r, $sformatf("turbo result %0d exp %0d", td_result, exp_r));
    chk(td_reused == exp_reuse, "turbo state reuse flag");
    case (td_result) ST_DECODED: n_dec++; ST_GAVE_UP: n_gu++; ST_MAX_ITER: n_max++; default: ; endcase
    if (td_reused) n_reuse++;
  endtask

  initial begin
    for (int j = 1; j <= NIN; j++) begin
      a[0][j] = int'($urandom_range(0, 8000)) - 4000;
      if (j >= 60 && j < 70) a[0][j] = 32767;
    end
    for (int s = 0; s < 3; s++)
      for (int k = 1; k <= NIN >> (s + 1); k++) begin
        longint sl, sh;
        sl = 0; sh = 0;
        for (int t = 0; t < 9; t++) if (2*k - t >= 1) sl += longint'(lp[t]) * a[s][2*k - t];
        for (int t = 0; t < 7; t++) if (2*k - t >= 1) sh += longint'(hp[t]) * a[s][2*k - t];
        a[s+1][k] = quant(sl); d[s+1][k] = quant(sh);
      end
    for (int i = 0; i < K; i++) h[i] = 16'($urandom);
    for (int n = 0; n < NF; n++) xs[n] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      fp_coef_we = 1; fs_coef_we = 1; fp_coef_addr = 6'(i); fs_coef_addr = 6'(i);
      fp_coef_data = h[i]; fs_coef_data = h[i];
      @(negedge clk);
    end
    fp_coef_we = 0; fs_coef_we = 0;
    fork
      begin : dwt_feed
        for (int j = 1; j <= NIN; j++) begin
          dwt_in_valid = 1; dwt_in_data = 16'(a[0][j]);
          while (!dwt_in_ready) @(negedge clk);
          @(negedge clk);
          if (j == 64) begin dwt_in_valid = 0; repeat (40) @(negedge clk); end
        end
        dwt_in_valid = 0;
      end
      begin : idwt_feed
        for (int k = 1; k <= NIN / 2; k++) begin
          idwt_in_valid = 1; idwt_in_level = 2'd0;
          idwt_in_approx = 16'(a[1][k]); idwt_in_detail = 16'(d[1][k]);
          while (!idwt_in_ready) @(negedge clk);
          @(negedge clk);
        end
        idwt_in_valid = 0;
      end
      begin : fp_feed
        for (int n = 0; n < NF; n++) begin
          fp_in_valid = 1; fp_in_x = xs[n];
          while (!fp_in_ready) @(negedge clk);
          @(negedge clk);
        end
        fp_in_valid = 0;
      end
      begin : fs_feed
        for (int n = 0; n < NF; n++) begin
          fs_in_valid = 1; fs_in_x = xs[n];
          while (!fs_in_ready) @(negedge clk);
          @(negedge clk);
        end
        fs_in_valid = 0;
      end
      begin : turbo
        td_packet(2'd1, 0, ST_DECODED, 0);
        for (int i = 0; i < NB; i += 97) begin
          td_dec_raddr = 10'(i); #1;
          chk(td_dec_rdata == bit'(((i * 7 + 3) >> 2) & 1), $sformatf("turbo bit %0d", i));
        end
        td_packet(2'd0, 0, ST_GAVE_UP, 0);
        td_packet(2'd1, 1, ST_DECODED, 1);
        td_packet(2'd2, 0, ST_MAX_ITER, 0);
      end
    join
    repeat (100) @(negedge clk);
    chk(got[1] == NIN/2 && got[2] == NIN/4 && got[3] == NIN/8 && got_a == NIN/8, "DWT output count");
    chk(nfp == NF && nfs == NF, "FIR output count");
    chk(nid == NIN / 2, "IDWT output count");
    $display("mechanisms: idwt_reconstructed=%0d idwt_backpressure=%0d", n_recon, n_idwt_bp);
    $display("mechanisms: dwt_stall=%0d dwt_octave_up=%0d saturation=%0d dwt_backpressure=%0d fp_backpressure=%0d fs_backpressure=%0d decoded=%0d gave_up=%0d reused=%0d max_iter=%0d",
             n_dwt_stall, n_dwt_up, n_sat, n_dwt_bp, n_fp_bp, n_fs_bp, n_dec, n_gu, n_reuse, n_max);
    chk(n_dwt_stall > 0, "DWT stall happened");
    chk(n_dwt_up > 0, "DWT higher-octave periods happened");
    chk(n_sat > 0, "saturation happened");
    chk(n_recon > 0 && n_idwt_bp > 0, "IDWT reconstruction and back-pressure happened");
    chk(n_dwt_bp > 0, "DWT back-pressure happened");
    chk(n_fp_bp > 0 && n_fs_bp > 0, "FIR back-pressure happened");
    chk(n_dec > 0 && n_gu > 0 && n_reuse > 0 && n_max > 0, "turbo paths happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
