// sc_layer: one fully connected layer of stochastic neurons.
//
// N_OUT sc_neuron instances all see the same N_IN input streams and the same
// shared weight stream bank. Neuron j takes its weights and biases from
// sc_pkg::neuron_weights(LAYER, j, ...) and sc_pkg::bias_units(LAYER, j, ...)
// (hard-wired constants, as in the source architecture where weights are
// fixed after training), and its comparator LFSR seed from LAYER and j.
//
// Timing: y[j] is registered, one cycle after the inputs.
// Each neuron's observation output acc is deliberately left unconnected.
module sc_layer #(
  parameter int unsigned N_IN        = 784,
  parameter int unsigned N_OUT       = 500,
  parameter int unsigned LAYER       = 0,
  parameter int unsigned BITLEN_LOG2 = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned QBITS       = sc_pkg::QBITS_DEF,
  parameter int unsigned RND_W       = 8,
  localparam int unsigned LEVELS     = 1 << QBITS,
  localparam int unsigned NGEN       = sc_pkg::num_gens(LEVELS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   en,
  input  logic [N_IN-1:0]        x,
  input  logic [NGEN-1:0]        wbank,
  input  logic [BITLEN_LOG2-1:0] tcnt,
  output logic [N_OUT-1:0]       y
);
  for (genvar j = 0; j < N_OUT; j++) begin : g_neuron
    localparam sc_pkg::wvec_t WJ = sc_pkg::neuron_weights(LAYER, j, N_IN, LEVELS);
    sc_neuron #(
      .N_IN       (N_IN),
      .BITLEN_LOG2(BITLEN_LOG2),
      .QBITS      (QBITS),
      .W          (WJ[N_IN-1:0]),
      .BIAS_POS   (sc_pkg::bias_units(LAYER, j, 1'b0, BITLEN_LOG2)),
      .BIAS_NEG   (sc_pkg::bias_units(LAYER, j, 1'b1, BITLEN_LOG2)),
      .RND_W      (RND_W),
      .SEED       (sc_pkg::lfsr_seed(LAYER * 4096 + j, RND_W))
    ) u_neuron (
      .clk, .rst_n, .restart, .en, .x, .wbank, .tcnt,
      .acc(), .y(y[j])
    );
  end
endmodule
