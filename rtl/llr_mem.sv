// LLR memory of the turbo decoder: DEPTH signed words with one write port
// and one synchronous read port (data one cycle after the address).  Each
// word has a valid flag; clear_i drops all flags in one cycle, after which
// every word reads as zero until written again.  That is how the decoder
// starts a packet from zero a-priori information without a DEPTH-cycle
// clearing pass, and how it keeps the previous a-priori values instead
// (state reuse) simply by not clearing.
module llr_mem #(
  parameter int unsigned DEPTH = turbo_pkg::BLK_LEN,
  parameter int unsigned W     = turbo_pkg::LLR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear_i,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic signed [W-1:0]      wdata_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic signed [W-1:0]      rdata_o
);
  logic signed [W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]    valid;

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      rdata_o <= '0;
    end else begin
      rdata_o <= valid[raddr_i] ? mem[raddr_i] : '0;
      if (clear_i)   valid          <= '0;
      else if (we_i) valid[waddr_i] <= 1'b1;
    end
  end
endmodule
