// Multiplier-adder (MA): the processing element shared by both folded FIR
// filters.  It computes  acc_o = x_i * h_i + add_i  in one combinational step,
// with the product at full precision and the sum at W bits, so a chain of them
// reproduces a full-precision transposed-form FIR.
//   x_i   : XW-bit signed sample     h_i : HW-bit signed coefficient
//   add_i : W-bit signed addend      acc_o : W-bit signed result
// No clock: the surrounding architecture registers the result.
module fir_ma #(
  parameter int unsigned XW = 8,
  parameter int unsigned HW = 16,
  parameter int unsigned W  = 30
) (
  input  logic signed [XW-1:0] x_i,
  input  logic signed [HW-1:0] h_i,
  input  logic signed [W-1:0]  add_i,
  output logic signed [W-1:0]  acc_o
);
  logic signed [XW+HW-1:0] prod;
  always_comb begin
    prod  = x_i * h_i;
    acc_o = W'(prod) + add_i;
  end
endmodule
