// Top level: four resource-efficient signal-processing engines side by
// side, each with its own ports.  They share only clock and reset.
//   dwt_*  limited-resource MAC-level DWT processor (4 MACs, Daubechies
//          (9,7), 3 octaves, 16-bit samples)
//   idwt_* inverse DWT on the same kind of MAC datapath (4 MACs, (9,7)
//          synthesis pair, one level per period, level-tagged input)
//   fp_*   parallel-in folded FIR filter (33 taps on 3 multiplier-adders,
//          one output every 11 cycles) - the pulse-shaping filter
//   fs_*   serial-in folded FIR filter, same filter and rate, other folding
//   td_*   turbo-decoder iteration control with early give-up and state
//          reuse; the two log-MAP SISO decoders it drives are external, and
//          their handshake, a-priori read port and extrinsic write port are
//          the td_siso_* ports
// See each block for its protocol and timing.
module lrvlsi_top
  import turbo_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // DWT processor
  input  logic                     dwt_coef_we,
  input  logic [5:0]               dwt_coef_addr,
  input  logic signed [15:0]       dwt_coef_data,
  input  logic                     dwt_in_valid,
  output logic                     dwt_in_ready,
  input  logic signed [15:0]       dwt_in_data,
  output logic                     dwt_out_valid,
  output logic [1:0]               dwt_out_level,
  output logic signed [15:0]       dwt_out_detail,
  output logic                     dwt_out_approx_valid,
  output logic signed [15:0]       dwt_out_approx,
  output logic                     dwt_busy,
  output logic                     dwt_stall,
  // inverse DWT processor
  input  logic                     idwt_coef_we,
  input  logic [5:0]               idwt_coef_addr,
  input  logic signed [15:0]       idwt_coef_data,
  input  logic                     idwt_in_valid,
  output logic                     idwt_in_ready,
  input  logic [1:0]               idwt_in_level,
  input  logic signed [15:0]       idwt_in_approx,
  input  logic signed [15:0]       idwt_in_detail,
  output logic                     idwt_out_valid,
  output logic [1:0]               idwt_out_level,
  output logic signed [15:0]       idwt_out_even,
  output logic signed [15:0]       idwt_out_odd,
  output logic                     idwt_busy,
  // parallel-in folded FIR
  input  logic                     fp_coef_we,
  input  logic [5:0]               fp_coef_addr,
  input  logic signed [15:0]       fp_coef_data,
  input  logic                     fp_in_valid,
  output logic                     fp_in_ready,
  input  logic signed [7:0]        fp_in_x,
  output logic                     fp_out_valid,
  output logic signed [29:0]       fp_out_y,
  // serial-in folded FIR
  input  logic                     fs_coef_we,
  input  logic [5:0]               fs_coef_addr,
  input  logic signed [15:0]       fs_coef_data,
  input  logic                     fs_in_valid,
  output logic                     fs_in_ready,
  input  logic signed [7:0]        fs_in_x,
  output logic                     fs_out_valid,
  output logic signed [29:0]       fs_out_y,
  // turbo decoder control
  input  logic                     td_pkt_start,
  input  logic                     td_pkt_resend,
  output logic                     td_busy,
  output logic                     td_done,
  output result_e                  td_result,
  output logic [7:0]               td_passes,
  output logic                     td_resend_req,
  output logic                     td_reused,
  input  logic [$clog2(BLK_LEN)-1:0] td_dec_raddr,
  output logic                     td_dec_rdata,
  output logic [LLR_W-1:0]         td_egu_mean,
  output logic                     td_siso_start,
  output logic                     td_siso_sel,
  input  logic                     td_siso_done,
  input  logic [$clog2(BLK_LEN)-1:0] td_siso_apri_addr,
  output logic signed [LLR_W-1:0]  td_siso_apri,
  input  logic                     td_siso_ext_valid,
  input  logic [$clog2(BLK_LEN)-1:0] td_siso_ext_addr,
  input  logic signed [LLR_W-1:0]  td_siso_ext,
  input  logic                     td_siso_hard
);
  dwt_processor u_dwt (
    .clk, .rst_n, .coef_we(dwt_coef_we), .coef_addr(dwt_coef_addr), .coef_data(dwt_coef_data),
    .in_valid(dwt_in_valid), .in_ready(dwt_in_ready), .in_data(dwt_in_data),
    .out_valid(dwt_out_valid), .out_level(dwt_out_level), .out_detail(dwt_out_detail),
    .out_approx_valid(dwt_out_approx_valid), .out_approx(dwt_out_approx),
    .busy_o(dwt_busy), .stall_o(dwt_stall));

  idwt_processor u_idwt (
    .clk, .rst_n, .coef_we(idwt_coef_we), .coef_addr(idwt_coef_addr), .coef_data(idwt_coef_data),
    .in_valid(idwt_in_valid), .in_ready(idwt_in_ready), .in_level(idwt_in_level),
    .in_approx(idwt_in_approx), .in_detail(idwt_in_detail), .out_valid(idwt_out_valid),
    .out_level(idwt_out_level), .out_even(idwt_out_even), .out_odd(idwt_out_odd),
    .busy_o(idwt_busy));

  fir_parallel_in u_fir_p (
    .clk, .rst_n, .coef_we(fp_coef_we), .coef_addr(fp_coef_addr), .coef_data(fp_coef_data),
    .in_valid(fp_in_valid), .in_ready(fp_in_ready), .in_x(fp_in_x),
    .out_valid(fp_out_valid), .out_y(fp_out_y));

  fir_serial_in u_fir_s (
    .clk, .rst_n, .coef_we(fs_coef_we), .coef_addr(fs_coef_addr), .coef_data(fs_coef_data),
    .in_valid(fs_in_valid), .in_ready(fs_in_ready), .in_x(fs_in_x),
    .out_valid(fs_out_valid), .out_y(fs_out_y));

  turbo_decoder u_turbo (
    .clk, .rst_n, .pkt_start_i(td_pkt_start), .pkt_resend_i(td_pkt_resend), .busy_o(td_busy),
    .done_o(td_done), .result_o(td_result), .passes_o(td_passes), .resend_req_o(td_resend_req),
    .reused_o(td_reused), .dec_raddr_i(td_dec_raddr), .dec_rdata_o(td_dec_rdata),
    .egu_mean_o(td_egu_mean), .siso_start_o(td_siso_start), .siso_sel_o(td_siso_sel),
    .siso_done_i(td_siso_done), .siso_apri_addr_i(td_siso_apri_addr), .siso_apri_o(td_siso_apri),
    .siso_ext_valid_i(td_siso_ext_valid), .siso_ext_addr_i(td_siso_ext_addr),
    .siso_ext_i(td_siso_ext), .siso_hard_i(td_siso_hard));
endmodule
