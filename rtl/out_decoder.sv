// out_decoder: turns the output-layer bit-streams into a class decision.
//
// One up-counter per output neuron counts the ones of its stream while `en`
// is high; `clear` zeroes them. The count over one stream period is the
// neuron's output value times 2**BITLEN_LOG2. `class_id` is the index of the
// largest count (lowest index on a tie). The stochastic-to-binary counters
// and the arg-max are this design's choice of how the classifier's outputs
// are read.
//
// Timing: counts are registered; class_id is combinational from them.
module out_decoder #(
  parameter int unsigned N           = 10,
  parameter int unsigned BITLEN_LOG2 = sc_pkg::BITLEN_LOG2_DEF,
  localparam int unsigned CW         = BITLEN_LOG2 + 1,
  localparam int unsigned IW         = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  en,
  input  logic [N-1:0]          y,
  output logic [N-1:0][CW-1:0]  counts,
  output logic [IW-1:0]         class_id
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) counts <= '0;
    else if (clear) counts <= '0;
    else if (en) begin
      for (int k = 0; k < int'(N); k++)
        if (y[k] && counts[k] != '1) counts[k] <= counts[k] + 1'b1;
    end
  end

  always_comb begin
    logic [CW-1:0] best;
    best     = counts[0];
    class_id = '0;
    for (int k = 1; k < int'(N); k++) begin
      if (counts[k] > best) begin
        best     = counts[k];
        class_id = IW'(k);
      end
    end
  end
endmodule
