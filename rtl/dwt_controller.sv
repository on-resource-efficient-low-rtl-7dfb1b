// Controller of the MAC-level DWT processor.
//
// It combines two parts of the limited-resource scheduling algorithm.
//  * A look-up table, constant entries of dwt_pkg::sched_op, holds the
//    four scheduling matrices (CM, DM, FbM, AccM) for one scheduling period of
//    q = ceil((m+n)/r) cycles.  While a period runs, ops_o gives, for each of
//    the r MACs, the row of the table selected by the row counter.
//  * An octave sequencer picks the octave a(k) of each scheduling period "as
//    soon as possible": when an octave s finishes a period, its approximation
//    sample goes to octave s+1; if that completes a pair, octave s+1 runs
//    next, otherwise the next period is octave 0 on a new input pair.  This is
//    the DM scheduling rule of the document written as pending-sample flags,
//    and it repeats every 2^S - 1 periods.
//
// Interface:
//   pair_avail_i  two input samples are waiting (octave 0 may start)
//   run_o/stage_o/row_o/ops_o  the current cycle's work
//   load_in_o     at this edge, load B1/B2 from the input buffer
//   load_oct_o    at this edge, load B1 = held sample of octave stage_o+1,
//                 B2 = the approximation being finished
//   store_half_o  at this edge, hold the finished approximation for octave
//                 stage_o+1
//   emit_o        at this edge, the period of octave stage_o completes and
//                 its outputs (level stage_o+1) are produced
// If an octave-0 period is due and no pair is waiting, the sequencer stalls
// (run_o low) until one is; stall_o marks those cycles.
module dwt_controller #(
  parameter int unsigned NUM_MAC = dwt_pkg::NUM_MAC,
  parameter int unsigned M       = dwt_pkg::LP_TAPS,
  parameter int unsigned N       = dwt_pkg::HP_TAPS,
  parameter int unsigned S       = dwt_pkg::STAGES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pair_avail_i,
  output logic                    run_o,
  output logic [$clog2(S+1)-1:0]  stage_o,
  output logic [7:0]              row_o,
  output dwt_pkg::mac_op_t        ops_o [NUM_MAC],
  output logic                    load_in_o,
  output logic                    load_oct_o,
  output logic                    store_half_o,
  output logic                    emit_o,
  output logic                    stall_o
);
  import dwt_pkg::*;
  localparam int unsigned Q = sched_period(M, N, NUM_MAC);

  // The table reads registers as they stood at the start of a cycle, so a
  // MAC must never need a register written by another MAC in the same row.
  // With the odd-order taps first this holds whenever floor(m/2)+floor(n/2)
  // is at least r.
  initial begin
    assert (M / 2 + N / 2 >= NUM_MAC)
      else $error("dwt_controller: too many MACs for this filter pair");
    assert (M + N < 2 ** IDX_W) else $error("dwt_controller: filters too long");
  end

  logic [7:0]             row;
  logic [$clog2(S+1)-1:0] stage;
  logic                   running;
  logic [S:0]             half_valid;   // octave s holds one sample of a pair
  logic                   period_end, go_up;

  always_comb begin
    period_end = running && (int'(row) == Q - 1);
    go_up      = (int'(stage) + 1 < S) && half_valid[stage + 1'b1];
    for (int j = 0; j < NUM_MAC; j++) begin
      ops_o[j] = '0;
      for (int i = 0; i < Q; i++) if (int'(row) == i) ops_o[j] = sched_op(i, j, M, N, NUM_MAC);
      if (!running) ops_o[j].en = 1'b0;
    end
    run_o        = running;
    stage_o      = stage;
    row_o        = row;
    emit_o       = period_end;
    load_oct_o   = period_end && go_up;
    store_half_o = period_end && !go_up && (int'(stage) + 1 < S);
    load_in_o    = (period_end && !go_up && pair_avail_i) || (!running && pair_avail_i);
    stall_o      = !running;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row        <= '0;
      stage      <= '0;
      running    <= 1'b0;
      half_valid <= '0;
    end else begin
      if (running && !period_end) begin
        row <= row + 1'b1;
      end else if (period_end) begin
        row <= '0;
        if (go_up) begin
          stage                  <= stage + 1'b1;
          half_valid[stage + 1'b1] <= 1'b0;
        end else begin
          if (int'(stage) + 1 < S) half_valid[stage + 1'b1] <= 1'b1;
          stage   <= '0;
          running <= pair_avail_i;
        end
      end else if (pair_avail_i) begin
        running <= 1'b1;
        row     <= '0;
        stage   <= '0;
      end
    end
  end
endmodule
