// lfsr: maximal-length Fibonacci linear-feedback shift register, the random
// source of the stochastic number generators and of the neuron comparators.
//
// The register shifts left each enabled cycle and feeds back the XOR of its
// tap bits (taps from sc_pkg::lfsr_taps, WIDTH 2..16). It walks through all
// 2**WIDTH-1 non-zero states. Reset and `restart` load SEED, so every image
// of the classifier sees the same random sequence (a deterministic,
// repeatable run; this is a choice of this design).
//
// Timing: `state` is registered; it changes one cycle after `en`.
module lfsr #(
  parameter int unsigned WIDTH = 5,
  parameter int unsigned SEED  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,  // reload SEED
  input  logic             en,       // advance one state
  output logic [WIDTH-1:0] state
);
  localparam logic [WIDTH-1:0] TAPS = WIDTH'(sc_pkg::lfsr_taps(WIDTH));
  localparam logic [WIDTH-1:0] INIT = WIDTH'(SEED);

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= INIT;
    else if (restart) state <= INIT;
    else if (en)      state <= {state[WIDTH-2:0], fb};
  end

  initial begin
    assert (TAPS != '0) else $error("lfsr: no tap table for WIDTH %0d", WIDTH);
    assert (INIT != '0) else $error("lfsr: SEED must be non-zero");
  end
endmodule
