// Early give-up detector of the turbo decoder.
//
// Over every pass of SISO decoder 1 it accumulates |Le1(u_k)|, the magnitude
// of the extrinsic LLR of each decoded bit; at the end of the pass the mean
// (the sum shifted by log2 BLK_LEN) is compared with the highest mean of
// earlier passes of the same packet.  For a packet that is being solved the
// mean keeps rising; for an unsolvable one it only oscillates within a band.
// The rule used here: a pass "does not rise" when its mean is below
// peak + INC_TH; after OSC_LEN consecutive passes that do not rise the packet
// is declared unsolvable (give_up_o).  The thresholds are this design's own
// choice; the monitored quantity is the document's.
//
// Interface: clear_i at the start of a packet; le_valid_i/le_i for each
// extrinsic value of SISO 1; pass_done_i once after the last one.  One cycle
// later decision_o pulses with give_up_o and mean_o valid (held until the
// next decision).  Exactly BLK_LEN values per pass are assumed.
module egu_detector #(
  parameter int unsigned BLK_LEN = turbo_pkg::BLK_LEN,
  parameter int unsigned LLR_W   = turbo_pkg::LLR_W,
  parameter int unsigned INC_TH  = turbo_pkg::EGU_INC_TH,
  parameter int unsigned OSC_LEN = turbo_pkg::EGU_OSC_LEN
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear_i,
  input  logic                    le_valid_i,
  input  logic signed [LLR_W-1:0] le_i,
  input  logic                    pass_done_i,
  output logic                    decision_o,
  output logic                    give_up_o,
  output logic [LLR_W-1:0]        mean_o
);
  localparam int unsigned LB = $clog2(BLK_LEN);
  localparam int unsigned SW = LLR_W + LB;
  localparam int unsigned CW = $clog2(OSC_LEN + 1);

  logic [SW-1:0]   sum;
  logic [LLR_W-1:0] peak;
  logic [CW-1:0]   osc_cnt;
  logic [LLR_W-1:0] mag, mean_now;
  logic            no_rise;

  always_comb begin
    mag      = le_i[LLR_W-1] ? LLR_W'(-le_i) : LLR_W'(le_i);
    mean_now = LLR_W'(sum >> LB);
    no_rise  = ({1'b0, mean_now} < {1'b0, peak} + (LLR_W+1)'(INC_TH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; peak <= '0; osc_cnt <= '0;
      decision_o <= 1'b0; give_up_o <= 1'b0; mean_o <= '0;
    end else begin
      decision_o <= 1'b0;
      if (clear_i) begin
        sum <= '0; peak <= '0; osc_cnt <= '0; give_up_o <= 1'b0;
      end else if (pass_done_i) begin
        decision_o <= 1'b1;
        mean_o     <= mean_now;
        sum        <= '0;
        if (mean_now > peak) peak <= mean_now;
        if (no_rise) begin
          if (int'(osc_cnt) < OSC_LEN) osc_cnt <= osc_cnt + 1'b1;
          give_up_o <= (int'(osc_cnt) + 1 >= OSC_LEN);
        end else begin
          osc_cnt   <= '0;
          give_up_o <= 1'b0;
        end
      end else if (le_valid_i) begin
        sum <= sum + SW'(mag);
      end
    end
  end
endmodule
