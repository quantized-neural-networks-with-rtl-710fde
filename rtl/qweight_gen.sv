// qweight_gen: quantized weight generator, the source of one shifted unary
// weight stream.
//
// A WIDTH-bit register of D flip-flops counts up by one each cycle and wraps
// every 2**WIDTH cycles; a comparator against the binary constant LEN makes
// the output 1 while the count is below LEN. The register is loaded with
// -PHASE (mod 2**WIDTH) at reset and on `restart`, so the stream is LEN
// contiguous ones starting PHASE cycles into every period: the weight
// LEN/2**WIDTH with its ones at a chosen phase. Different loaded values give
// the interleaved phases the SUC-Adders need. `cnt` is the count itself.
//
// Timing: `w` and `cnt` come from the register; `w` is high in cycles
// PHASE..PHASE+LEN-1 (mod period) after reset or `restart`.
module qweight_gen #(
  parameter int unsigned WIDTH = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned LEN   = 8,   // ones per period, 0..2**WIDTH
  parameter int unsigned PHASE = 0    // first cycle of the ones
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             en,
  output logic             w,
  output logic [WIDTH-1:0] cnt
);
  localparam logic [WIDTH-1:0] INIT   = WIDTH'((1 << WIDTH) - (PHASE % (1 << WIDTH)));
  localparam logic [WIDTH:0]   LEN_C  = (WIDTH+1)'(LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= INIT;
    else if (restart) cnt <= INIT;
    else if (en)      cnt <= cnt + 1'b1;
  end

  assign w = ({1'b0, cnt} < LEN_C);

  initial assert (LEN <= (1 << WIDTH)) else $error("qweight_gen: LEN too large");
endmodule
