// Power-aware iteration control of a turbo decoder: early termination,
// early give-up and state reuse around two SISO (log-MAP) decoders.
//
// The SISO decoders are outside this block.  It starts them one at a time
// (siso_sel_o = 0 for decoder 1, 1 for decoder 2), serves their a-priori
// reads from two LLR memories and stores their extrinsic outputs:
//   mem_a : a-priori of decoder 1 = extrinsic of decoder 2
//   mem_b : a-priori of decoder 2 = extrinsic of decoder 1
// (interleaving is done by the SISO side through the addresses it uses).
//
// Flow for one packet (steps of the decoding flowchart):
//   4-0 initialise a-priori LLRs: zero, or for a resent packet whose
//       previous attempt was given up, keep mem_a (state reuse)
//   4-1 SISO 1, 4-2 SISO 2
//   4-3 early termination?  -> decoded
//   4-4 SISO 1
//   4-5 early give-up?       -> stop, keep mem_a, request a resend
//   4-6 SISO 2
//   4-7 iteration limit?     -> stop; otherwise back to 4-3
// Early give-up is decided by egu_detector from the mean |Le1|.  Early
// termination is this design's choice, since the technique accepts any:
// hard-decision agreement, i.e. the hard decisions of decoder 2 are
// unchanged from its previous pass.
//
// SISO side protocol: after siso_start_o, the decoder streams BLK_LEN
// extrinsic values (siso_ext_valid_i, address, value, hard decision of the
// a-posteriori LLR) and raises siso_done_i once after the last; a-priori
// reads return data one cycle after siso_apri_addr_i.
// Packet side: pkt_start_i (with pkt_resend_i) when idle; done_o pulses with
// result_o and passes_o (SISO passes used); resend_req_o pulses on give-up;
// reused_o tells that the packet started from kept a-priori values.  The hard
// decisions stay readable through dec_raddr_i/dec_rdata_o.
module turbo_decoder #(
  parameter int unsigned BLK_LEN  = turbo_pkg::BLK_LEN,
  parameter int unsigned LLR_W    = turbo_pkg::LLR_W,
  parameter int unsigned MAX_ITER = turbo_pkg::MAX_ITER,
  parameter int unsigned INC_TH   = turbo_pkg::EGU_INC_TH,
  parameter int unsigned OSC_LEN  = turbo_pkg::EGU_OSC_LEN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // packet / ARQ side
  input  logic                       pkt_start_i,
  input  logic                       pkt_resend_i,
  output logic                       busy_o,
  output logic                       done_o,
  output turbo_pkg::result_e         result_o,
  output logic [7:0]                 passes_o,
  output logic                       resend_req_o,
  output logic                       reused_o,
  input  logic [$clog2(BLK_LEN)-1:0] dec_raddr_i,
  output logic                       dec_rdata_o,
  output logic [LLR_W-1:0]           egu_mean_o,
  // SISO side
  output logic                       siso_start_o,
  output logic                       siso_sel_o,
  input  logic                       siso_done_i,
  input  logic [$clog2(BLK_LEN)-1:0] siso_apri_addr_i,
  output logic signed [LLR_W-1:0]    siso_apri_o,
  input  logic                       siso_ext_valid_i,
  input  logic [$clog2(BLK_LEN)-1:0] siso_ext_addr_i,
  input  logic signed [LLR_W-1:0]    siso_ext_i,
  input  logic                       siso_hard_i
);
  import turbo_pkg::*;
  localparam int unsigned AW = $clog2(BLK_LEN);

  typedef enum logic [3:0] {
    IDLE, INIT, S1_FIRST, S2_FIRST, CHK_ET, S1, EGU_WAIT, S2, GIVE_UP, FINISH
  } state_e;
  state_e state;

  logic          pkt_resend_q;    // the packet being decoded is a resend
  logic          saved_valid;     // mem_a holds the a-priori of a given-up packet
  logic          clr_a, clr_b;
  logic          in_s1, in_s2;
  logic [7:0]    iter;
  logic [AW:0]   mismatches;
  logic          have_prev;
  logic [BLK_LEN-1:0] hard;
  logic          egu_dec, egu_giveup;
  logic signed [LLR_W-1:0] rd_a, rd_b;
  result_e       result_n;

  assign in_s1 = (state == S1_FIRST) || (state == S1);
  assign in_s2 = (state == S2_FIRST) || (state == S2);

  llr_mem #(.DEPTH(BLK_LEN), .W(LLR_W)) u_mem_a (
    .clk, .rst_n, .clear_i(clr_a), .we_i(siso_ext_valid_i && in_s2),
    .waddr_i(siso_ext_addr_i), .wdata_i(siso_ext_i),
    .raddr_i(siso_apri_addr_i), .rdata_o(rd_a));
  llr_mem #(.DEPTH(BLK_LEN), .W(LLR_W)) u_mem_b (
    .clk, .rst_n, .clear_i(clr_b), .we_i(siso_ext_valid_i && in_s1),
    .waddr_i(siso_ext_addr_i), .wdata_i(siso_ext_i),
    .raddr_i(siso_apri_addr_i), .rdata_o(rd_b));
  assign siso_apri_o = siso_sel_o ? rd_b : rd_a;

  egu_detector #(.BLK_LEN(BLK_LEN), .LLR_W(LLR_W), .INC_TH(INC_TH), .OSC_LEN(OSC_LEN)) u_egu (
    .clk, .rst_n, .clear_i(state == INIT), .le_valid_i(siso_ext_valid_i && in_s1),
    .le_i(siso_ext_i), .pass_done_i(siso_done_i && in_s1),
    .decision_o(egu_dec), .give_up_o(egu_giveup), .mean_o(egu_mean_o));

  always_comb begin
    clr_b = (state == INIT);
    clr_a = (state == INIT) && !(pkt_resend_q && saved_valid);
  end

  assign busy_o      = (state != IDLE);
  assign dec_rdata_o = hard[dec_raddr_i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      saved_valid  <= 1'b0;
      pkt_resend_q <= 1'b0;
      iter         <= '0;
      passes_o     <= '0;
      mismatches   <= '0;
      have_prev    <= 1'b0;
      hard         <= '0;
      siso_start_o <= 1'b0;
      siso_sel_o   <= 1'b0;
      done_o       <= 1'b0;
      result_o     <= ST_NONE;
      result_n     <= ST_NONE;
      resend_req_o <= 1'b0;
      reused_o     <= 1'b0;
    end else begin
      siso_start_o <= 1'b0;
      done_o       <= 1'b0;
      resend_req_o <= 1'b0;
      // hard-decision agreement of decoder 2 with its previous pass
      if (siso_ext_valid_i && in_s2) begin
        hard[siso_ext_addr_i] <= siso_hard_i;
        if (hard[siso_ext_addr_i] != siso_hard_i) mismatches <= mismatches + 1'b1;
      end
      unique case (state)
        IDLE: if (pkt_start_i) begin
          pkt_resend_q <= pkt_resend_i;
          state        <= INIT;
        end
        INIT: begin                                       // step 4-0
          reused_o     <= pkt_resend_q && saved_valid;
          iter         <= '0;
          passes_o     <= '0;
          have_prev    <= 1'b0;
          siso_sel_o   <= 1'b0;
          siso_start_o <= 1'b1;
          state        <= S1_FIRST;
        end
        S1_FIRST: if (siso_done_i) begin                 // step 4-1
          passes_o     <= passes_o + 1'b1;
          mismatches   <= '0;
          siso_sel_o   <= 1'b1;
          siso_start_o <= 1'b1;
          state        <= S2_FIRST;
        end
        S2_FIRST: if (siso_done_i) begin                 // step 4-2
          passes_o  <= passes_o + 1'b1;
          iter      <= iter + 1'b1;
          state     <= CHK_ET;
        end
        CHK_ET: begin                                     // step 4-3
          if (have_prev && mismatches == '0) begin
            result_n <= ST_DECODED;
            state    <= FINISH;
          end else begin
            have_prev    <= 1'b1;
            siso_sel_o   <= 1'b0;
            siso_start_o <= 1'b1;
            state        <= S1;
          end
        end
        S1: if (siso_done_i) begin                       // step 4-4
          passes_o <= passes_o + 1'b1;
          state    <= EGU_WAIT;
        end
        EGU_WAIT: if (egu_dec) begin                      // step 4-5
          if (egu_giveup) begin
            state <= GIVE_UP;
          end else begin
            mismatches   <= '0;
            siso_sel_o   <= 1'b1;
            siso_start_o <= 1'b1;
            state        <= S2;
          end
        end
        S2: if (siso_done_i) begin                       // steps 4-6, 4-7
          passes_o <= passes_o + 1'b1;
          iter     <= iter + 1'b1;
          if (int'(iter) + 1 >= MAX_ITER) begin
            result_n <= ST_MAX_ITER;
            state    <= FINISH;
          end else begin
            state <= CHK_ET;
          end
        end
        GIVE_UP: begin
          saved_valid  <= 1'b1;                           // keep mem_a
          resend_req_o <= 1'b1;
          result_n     <= ST_GAVE_UP;
          state        <= FINISH;
        end
        FINISH: begin
          if (result_n != ST_GAVE_UP) saved_valid <= 1'b0;
          result_o <= result_n;
          done_o   <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
