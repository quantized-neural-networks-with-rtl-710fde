// sc_neuron: one stochastic neuron with hard-wired quantized weights,
// computing p = sigmoid(A*x + B) on unipolar bit-streams.
//
// Structure, following the SUC-Adder neuron architecture:
//  * Inputs are split by the sign of their weight into a positive and a
//    negative part. Each non-zero weight selects a shifted unary stream from
//    the shared generator bank (`wbank`).
//  * Within each part, products whose weight windows fit together share one
//    suc_adder (AND per product, one OR). The grouping and the window offsets
//    are fixed at elaboration by sc_pkg::pack_groups() from the weights W.
//  * A par_counter per part counts the adder outputs each cycle; the bias of
//    that part is added (integer part as a constant, fractional part as a
//    deterministic stream, bit-reversed cycle count < fraction: this bias
//    encoding is this design's choice).
//  * acc = positive count - negative count is, on average over a period,
//    A*x + B. The output bit is acc + 2 > r, r a uniform 2-bit random number
//    from the neuron's own LFSR: P(y=1) = clamp((acc+2)/4, 0, 1), the linear
//    sigmoid approximation (x+2)/4 obtained with no extra logic.
//
// Parameters: W holds one signed level per input (weight = level/2**QBITS);
// BIAS_POS/BIAS_NEG are in units of 1/2**BITLEN_LOG2.
// Timing: `acc` is combinational from x, wbank and tcnt; `y` is registered,
// one cycle after its inputs, and cleared by reset and `restart`.
// An assertion per adder checks that at most one of its weight windows is
// open in any cycle. It is disabled during reset, so rst_n also appears in a
// clocked context; the lint note that rst_n is used both asynchronously and
// synchronously refers only to this check, not to the logic.
// Unused bits: only the low 2 bits of the LFSR feed the comparator, and a
// zero bias makes its fraction compare constant; both are intended.
module sc_neuron #(
  parameter int unsigned N_IN        = 8,
  parameter int unsigned BITLEN_LOG2 = sc_pkg::BITLEN_LOG2_DEF,
  parameter int unsigned QBITS       = sc_pkg::QBITS_DEF,
  parameter logic [N_IN-1:0][sc_pkg::WL_W-1:0] W =
      (N_IN * sc_pkg::WL_W)'(sc_pkg::neuron_weights(0, 0, N_IN, 1 << QBITS)),
  parameter int unsigned BIAS_POS    = 0,
  parameter int unsigned BIAS_NEG    = 0,
  parameter int unsigned RND_W       = 8,
  parameter int unsigned SEED        = 1,
  localparam int unsigned LEVELS     = 1 << QBITS,
  localparam int unsigned NGEN       = sc_pkg::num_gens(LEVELS),
  localparam int unsigned SW         = $clog2(N_IN + (BIAS_POS >> BITLEN_LOG2)
                                              + (BIAS_NEG >> BITLEN_LOG2) + 4) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   en,
  input  logic [N_IN-1:0]        x,
  input  logic [NGEN-1:0]        wbank,
  input  logic [BITLEN_LOG2-1:0] tcnt,
  output logic signed [SW-1:0]   acc,
  output logic                   y
);
  import sc_pkg::*;

  localparam wvec_t       WX   = wvec_t'(W);
  localparam asg_arr_t    ASG  = pack_groups(WX, N_IN, LEVELS);
  localparam int unsigned NPOS = ASG[ASG_NPOS];
  localparam int unsigned NNEG = ASG[ASG_NNEG];
  localparam int unsigned NP   = (NPOS > 0) ? NPOS : 1;
  localparam int unsigned NN   = (NNEG > 0) ? NNEG : 1;
  localparam int unsigned BMASK = (1 << BITLEN_LOG2) - 1;

  // Sigmoid approximation (x + SIG_OFFSET) / 2**SIG_BITS = (x + 2) / 4.
  localparam int unsigned SIG_OFFSET = 2;
  localparam int unsigned SIG_BITS   = 2;

  // Slot k of adder g holds the product whose weight window starts at unit k.
  logic [LEVELS-1:0] pos_x [NP];
  logic [LEVELS-1:0] pos_w [NP];
  logic [LEVELS-1:0] neg_x [NN];
  logic [LEVELS-1:0] neg_w [NN];

  always_comb begin
    asg_t e;
    int   gi, oi, bi;
    for (int g = 0; g < int'(NP); g++) begin
      pos_x[g] = '0;
      pos_w[g] = '0;
    end
    for (int g = 0; g < int'(NN); g++) begin
      neg_x[g] = '0;
      neg_w[g] = '0;
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      e  = asg_t'(ASG[i]);
      gi = int'(e.grp);
      oi = int'(e.off);
      bi = int'(e.gidx);
      if (e.used && !e.neg) begin
        pos_x[gi][oi] = x[i];
        pos_w[gi][oi] = wbank[bi];
      end else if (e.used) begin
        neg_x[gi][oi] = x[i];
        neg_w[gi][oi] = wbank[bi];
      end
    end
  end

  logic [NP-1:0] pos_sum;
  logic [NN-1:0] neg_sum;

  for (genvar g = 0; g < NP; g++) begin : g_pos
    if (g < NPOS) begin : g_add
      suc_adder #(.K(LEVELS)) u_add (.x(pos_x[g]), .w(pos_w[g]), .y(pos_sum[g]));
      a_disjoint : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pos_w[g]))
        else $error("sc_neuron: overlapping weight windows in positive adder %0d", g);
    end else begin : g_none
      assign pos_sum[g] = 1'b0;
    end
  end

  for (genvar g = 0; g < NN; g++) begin : g_neg
    if (g < NNEG) begin : g_add
      suc_adder #(.K(LEVELS)) u_add (.x(neg_x[g]), .w(neg_w[g]), .y(neg_sum[g]));
      a_disjoint : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(neg_w[g]))
        else $error("sc_neuron: overlapping weight windows in negative adder %0d", g);
    end else begin : g_none
      assign neg_sum[g] = 1'b0;
    end
  end

  logic [$clog2(NP+1)-1:0] pos_cnt;
  logic [$clog2(NN+1)-1:0] neg_cnt;

  par_counter #(.N(NP)) u_pos_cnt (.bits(pos_sum), .count(pos_cnt));
  par_counter #(.N(NN)) u_neg_cnt (.bits(neg_sum), .count(neg_cnt));

  // Bias streams: fraction f/2**BITLEN_LOG2 as ones where the bit-reversed
  // cycle count is below f, which spreads them evenly over the period.
  logic [BITLEN_LOG2-1:0] tcnt_rev;
  always_comb
    for (int b = 0; b < int'(BITLEN_LOG2); b++) tcnt_rev[b] = tcnt[BITLEN_LOG2-1-b];

  logic bias_pos_bit, bias_neg_bit;
  assign bias_pos_bit = ({1'b0, tcnt_rev} < (BITLEN_LOG2+1)'(BIAS_POS & BMASK));
  assign bias_neg_bit = ({1'b0, tcnt_rev} < (BITLEN_LOG2+1)'(BIAS_NEG & BMASK));

  logic signed [SW-1:0] pos_total, neg_total;
  assign pos_total = SW'(pos_cnt) + SW'(BIAS_POS >> BITLEN_LOG2) + SW'(bias_pos_bit);
  assign neg_total = SW'(neg_cnt) + SW'(BIAS_NEG >> BITLEN_LOG2) + SW'(bias_neg_bit);
  assign acc       = pos_total - neg_total;

  logic [RND_W-1:0] rnd;
  lfsr #(.WIDTH(RND_W), .SEED(SEED)) u_rnd (.clk, .rst_n, .restart, .en, .state(rnd));

  logic signed [SW:0] shifted;
  logic               y_next;
  assign shifted = (SW+1)'(acc) + (SW+1)'(SIG_OFFSET);
  assign y_next  = shifted > $signed((SW+1)'(rnd[SIG_BITS-1:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       y <= 1'b0;
    else if (restart) y <= 1'b0;
    else if (en)      y <= y_next;
  end
endmodule
