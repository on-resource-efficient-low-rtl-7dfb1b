// Behavioural stand-in for a log-MAP SISO decoder, for testbenches only.
// It does no decoding: it produces extrinsic values whose statistics mimic
// the three cases the iteration control must handle, selected by mode_i:
//   0 unsolvable : |Le| = 6..13 at random, random signs and hard decisions
//                  (the mean oscillates in a band)
//   1 solvable   : |Le| = min(127, 2|a-priori| + 6) with the true sign; the
//                  hard decision is right once |Le| >= 24, random before
//   2 marginal   : |Le| = min(127, |a-priori| + 5), random hard decisions
//                  (the mean keeps rising, the bits never settle)
// The true bit of address k is bit 0 of k*7+3 >> 2.  On start_i it streams
// one value per cycle for addresses 0..N-1 (decoder 2 walks them in a fixed
// permuted order), reading the a-priori value one cycle ahead, then pulses
// done_o.  It also counts how many a-priori reads returned non-zero values in
// the current pass (nonzero_apri_o).
module siso_model #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 8
) (
  input  logic                   clk,
  input  logic                   start_i,
  input  logic                   sel_i,
  input  logic [1:0]             mode_i,
  output logic [$clog2(N)-1:0]   apri_addr_o,
  input  logic signed [W-1:0]    apri_i,
  output logic                   ext_valid_o,
  output logic [$clog2(N)-1:0]   ext_addr_o,
  output logic signed [W-1:0]    ext_o,
  output logic                   hard_o,
  output logic                   done_o,
  output int                     nonzero_apri_o
);
  function automatic logic [$clog2(N)-1:0] perm(int k, bit s);
    return s ? $clog2(N)'((k * 5 + 1) % N) : $clog2(N)'(k);
  endfunction
  function automatic bit truth(int a);
    return bit'(((a * 7 + 3) >> 2) & 1);
  endfunction

  initial begin
    ext_valid_o = 0; done_o = 0; apri_addr_o = '0; ext_addr_o = '0; ext_o = '0;
    hard_o = 0; nonzero_apri_o = 0;
  end

  always @(posedge clk) if (start_i) fork run(sel_i); join_none

  task automatic run(bit s);
    int mag, am;
    bit sg, hd;
    nonzero_apri_o = 0;
    apri_addr_o <= perm(0, s);
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      apri_addr_o <= perm((k + 1) % N, s);
      @(negedge clk);
      am = (apri_i < 0) ? -int'(apri_i) : int'(apri_i);
      if (apri_i != 0) nonzero_apri_o++;
      case (mode_i)
        2'd1: begin
          mag = 2 * am + 6; if (mag > 127) mag = 127;
          sg  = truth(int'(perm(k, s)));
          hd  = (mag >= 24) ? sg : bit'($urandom & 1);
        end
        2'd2: begin
          mag = am + 5; if (mag > 127) mag = 127;
          sg  = bit'($urandom & 1);
          hd  = bit'($urandom & 1);
        end
        default: begin
          mag = 6 + int'($urandom % 8);
          sg  = bit'($urandom & 1);
          hd  = bit'($urandom & 1);
        end
      endcase
      ext_valid_o <= 1;
      ext_addr_o  <= perm(k, s);
      ext_o       <= sg ? W'(mag) : W'(-mag);
      hard_o      <= hd;
      @(posedge clk);
    end
    ext_valid_o <= 0;
    done_o      <= 1;
    @(posedge clk);
    done_o      <= 0;
  endtask
endmodule
