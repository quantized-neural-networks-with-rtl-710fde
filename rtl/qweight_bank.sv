// qweight_bank: every shifted unary weight stream the network uses.
//
// With L = 2**QBITS levels, level l (weight l/L) has floor(L/l) interleaved
// phases: its window of l units starts at unit 0, l, 2l, ... A unit is
// 2**BITLEN_LOG2 / L cycles. One qweight_gen per (level, phase) gives
// sum_{l=1..L} floor(L/l) streams in all (8 for 2-bit weights), shared by all
// neurons of all layers. Stream k is at index sc_pkg::gen_index(L, l, off).
// `tcnt` is the cycle count within the period (the counter of the level-1,
// phase-0 generator); neurons use it to make their bias streams.
//
// Timing: all outputs are registered. Reset and `restart` realign every
// generator to the start of a period.
module qweight_bank #(
  parameter int unsigned BITLEN_LOG2 = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned QBITS       = sc_pkg::QBITS_DEF,
  localparam int unsigned LEVELS     = 1 << QBITS,
  localparam int unsigned NGEN       = sc_pkg::num_gens(LEVELS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   en,
  output logic [NGEN-1:0]        wbank,
  output logic [BITLEN_LOG2-1:0] tcnt
);
  localparam int unsigned UNIT = (1 << BITLEN_LOG2) / LEVELS;

  logic [BITLEN_LOG2-1:0] cnts [NGEN];

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar s = 0; s < LEVELS / l; s++) begin : g_phase
      localparam int unsigned IDX = sc_pkg::gen_index(LEVELS, l, s * l);
      qweight_gen #(
        .WIDTH(BITLEN_LOG2), .LEN(l * UNIT), .PHASE(s * l * UNIT)
      ) u_gen (
        .clk, .rst_n, .restart, .en, .w(wbank[IDX]), .cnt(cnts[IDX])
      );
    end
  end

  assign tcnt = cnts[0];

  initial assert (BITLEN_LOG2 >= QBITS) else $error("qweight_bank: stream shorter than levels");
endmodule
