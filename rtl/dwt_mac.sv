// One MAC of the DWT arithmetic unit: acc_o = coef_i * data_i + fb_i, with
// the product at full precision and the sum at AW bits.  Combinational; the
// output register bank of the processor stores the result.
module dwt_mac #(
  parameter int unsigned DW = dwt_pkg::DATA_W,
  parameter int unsigned CW = dwt_pkg::COEF_W,
  parameter int unsigned AW = dwt_pkg::DATA_W + dwt_pkg::COEF_W + 4
) (
  input  logic signed [CW-1:0] coef_i,
  input  logic signed [DW-1:0] data_i,
  input  logic signed [AW-1:0] fb_i,
  output logic signed [AW-1:0] acc_o
);
  logic signed [CW+DW-1:0] prod;
  always_comb begin
    prod  = coef_i * data_i;
    acc_o = AW'(prod) + fb_i;
  end
endmodule
