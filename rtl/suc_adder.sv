// suc_adder: shifted unary code adder with its quantized multipliers.
//
// Input k is a unipolar stream x[k]; w[k] is its shifted unary weight stream.
// x[k] AND w[k] is the product (the weight keeps a contiguous window of the
// input and zeroes the rest), and one OR gate merges the K products. When the
// weight windows never overlap and their levels sum to at most one period,
// each product fills the zeros of the others and the output encodes
// sum_k x[k]*weight[k] with no OR-adder loss. The neuron checks the
// no-overlap rule with an assertion.
//
// Timing: purely combinational.
module suc_adder #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] x,
  input  logic [K-1:0] w,
  output logic         y
);
  assign y = |(x & w);
endmodule
