// qsnn_rbm: stochastic RBM classifier with quantized weights and SUC-Adder
// neurons, 784-500-1000-10 by default (MNIST images in, ten class scores out).
//
// Datapath: each pixel drives an sng (5-bit LFSR + comparator on the pixel's
// top BITLEN_LOG2 bits). One qweight_bank makes the shifted unary weight
// streams for the whole network. Three sc_layer stages follow, each neuron
// registering its output bit, and out_decoder counts the ten output streams
// and picks the largest.
//
// Operation: pulse `start` for one cycle while `busy` is low, holding
// `pixels` stable until `done`. The start cycle reloads every LFSR and weight
// generator and clears the counters. The network then runs 2**BITLEN_LOG2 + 3
// cycles: the three layer registers fill in 3 cycles and the output streams
// are counted for the following 2**BITLEN_LOG2 cycles. `done` pulses one
// cycle after the last count, with `counts` and `class_id` valid until the
// next start. A new image can start on the `done` cycle.
// The sequencing, the pixel width and the output counters are this design's
// choices; the network shape, the 32-cycle stream and the 2-bit weights
// follow the source architecture. Weights come from sc_pkg (placeholders for
// retrained weights).
module qsnn_rbm #(
  parameter int unsigned N_IN        = 784,
  parameter int unsigned N_H1        = 500,
  parameter int unsigned N_H2        = 1000,
  parameter int unsigned N_OUT       = 10,
  parameter int unsigned BITLEN_LOG2 = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned QBITS       = sc_pkg::QBITS_DEF,
  parameter int unsigned PIX_W       = 8,
  parameter int unsigned RND_W       = 8,
  localparam int unsigned CW         = BITLEN_LOG2 + 1,
  localparam int unsigned IW         = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [N_IN-1:0][PIX_W-1:0]   pixels,
  output logic                         busy,
  output logic                         done,
  output logic [N_OUT-1:0][CW-1:0]     counts,
  output logic [IW-1:0]                class_id
);
  localparam int unsigned LEVELS = 1 << QBITS;
  localparam int unsigned NGEN   = sc_pkg::num_gens(LEVELS);
  localparam int unsigned DEPTH  = 3;                        // layer registers
  localparam int unsigned RUN_CYCLES = (1 << BITLEN_LOG2) + DEPTH;
  localparam int unsigned CYW    = $clog2(RUN_CYCLES + 1);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t         state;
  logic [CYW-1:0] cyc;
  logic           restart, en, last;

  assign restart = start && (state == S_IDLE);
  assign en      = (state == S_RUN);
  assign last    = en && (cyc == CYW'(RUN_CYCLES - 1));
  assign busy    = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
      done  <= 1'b0;
    end else begin
      done <= last;
      if (restart) begin
        state <= S_RUN;
        cyc   <= '0;
      end else if (last) begin
        state <= S_IDLE;
      end else if (en) begin
        cyc <= cyc + 1'b1;
      end
    end
  end

  // Pixel stochastic number generators.
  logic [N_IN-1:0] x0;
  for (genvar i = 0; i < N_IN; i++) begin : g_sng
    sng #(.WIDTH(BITLEN_LOG2), .SEED(sc_pkg::lfsr_seed(i, BITLEN_LOG2))) u_sng (
      .clk, .rst_n, .restart, .en,
      .value(pixels[i][PIX_W-1 -: BITLEN_LOG2]), .bit_out(x0[i])
    );
  end

  // Shared shifted unary weight streams.
  logic [NGEN-1:0]        wbank;
  logic [BITLEN_LOG2-1:0] tcnt;
  qweight_bank #(.BITLEN_LOG2(BITLEN_LOG2), .QBITS(QBITS)) u_bank (
    .clk, .rst_n, .restart, .en, .wbank, .tcnt
  );

  logic [N_H1-1:0]  h1;
  logic [N_H2-1:0]  h2;
  logic [N_OUT-1:0] yo;

  sc_layer #(.N_IN(N_IN), .N_OUT(N_H1), .LAYER(0), .BITLEN_LOG2(BITLEN_LOG2),
             .QBITS(QBITS), .RND_W(RND_W)) u_l1 (
    .clk, .rst_n, .restart, .en, .x(x0), .wbank, .tcnt, .y(h1));
  sc_layer #(.N_IN(N_H1), .N_OUT(N_H2), .LAYER(1), .BITLEN_LOG2(BITLEN_LOG2),
             .QBITS(QBITS), .RND_W(RND_W)) u_l2 (
    .clk, .rst_n, .restart, .en, .x(h1), .wbank, .tcnt, .y(h2));
  sc_layer #(.N_IN(N_H2), .N_OUT(N_OUT), .LAYER(2), .BITLEN_LOG2(BITLEN_LOG2),
             .QBITS(QBITS), .RND_W(RND_W)) u_l3 (
    .clk, .rst_n, .restart, .en, .x(h2), .wbank, .tcnt, .y(yo));

  out_decoder #(.N(N_OUT), .BITLEN_LOG2(BITLEN_LOG2)) u_out (
    .clk, .rst_n, .clear(restart), .en(en && cyc >= CYW'(DEPTH)), .y(yo),
    .counts, .class_id
  );

  initial assert (BITLEN_LOG2 <= PIX_W && BITLEN_LOG2 >= QBITS)
    else $error("qsnn_rbm: BITLEN_LOG2 must lie between QBITS and PIX_W");
endmodule
