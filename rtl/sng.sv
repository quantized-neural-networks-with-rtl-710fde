// sng: stochastic number generator, turning a binary value into a unipolar
// bit-stream.
//
// An LFSR of WIDTH bits and a comparator: the output is 1 while the LFSR
// state is at most `value`. Over one LFSR period (2**WIDTH-1 cycles) the
// stream holds exactly `value` ones, so it encodes value/(2**WIDTH-1).
// A 5-bit LFSR matches 32-cycle streams. The classifier uses one per pixel.
//
// Timing: `bit_out` is combinational from the registered LFSR state and the
// `value` input, which must be held for the whole stream.
module sng #(
  parameter int unsigned WIDTH = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned SEED  = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             en,
  input  logic [WIDTH-1:0] value,
  output logic             bit_out
);
  logic [WIDTH-1:0] rnd;

  lfsr #(.WIDTH(WIDTH), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .restart, .en, .state(rnd)
  );

  assign bit_out = (rnd <= value);
endmodule
