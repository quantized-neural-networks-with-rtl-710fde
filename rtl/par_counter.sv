// par_counter: parallel counter, the number of ones among N input bits in
// the same cycle. It sums the SUC-Adder outputs of one polarity of a neuron.
//
// Timing: purely combinational (an adder tree after synthesis).
module par_counter #(
  parameter int unsigned N = 8,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + CW'(bits[i]);
  end
endmodule
