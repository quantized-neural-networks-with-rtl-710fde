// sc_pkg: shared constants, types and elaboration-time functions of the
// stochastic quantized neural network.
//
// Unipolar stochastic computing: a value v in [0,1] is a bit-stream whose
// fraction of ones is v. A bit-stream is 2**BITLEN_LOG2 cycles long. Weights
// are quantized to QBITS bits: a weight magnitude is level/2**QBITS with
// level in 0..2**QBITS, plus a sign. One weight "unit" is
// 2**BITLEN_LOG2 / 2**QBITS consecutive cycles of the stream.
//
// A shifted unary weight stream of level l at unit offset o is high in units
// o..o+l-1 of every period. Products whose weight windows do not overlap can
// share one OR gate (the SUC-Adder). pack_groups() decides, per neuron, which
// products share an adder and at which offset each weight window sits. The
// weights are hard-wired constants, so this runs at elaboration time.
//
// Packing rule (this design's choice; the source architecture only asks for
// as many products per adder as possible): weights are taken largest level
// first; each goes into the open adder with the smallest free space that
// still fits it at an offset that is a multiple of its level, else into a new
// adder. For 2-bit weights this is optimal (3+1, 2+2, 2+1+1, 1+1+1+1, 4).
// Offsets that are multiples of the level keep the number of distinct weight
// streams at sum_{l=1..L} floor(L/l), L = 2**QBITS.
//
// weight_level() and bias_units() stand in for the weights a quantized
// retraining flow would produce. They are a deterministic hash with mostly
// small levels and many zeros. Replace their bodies with a trained table to
// build a real classifier; nothing else changes.
package sc_pkg;

  // Default sizes: 32-cycle streams (5-bit generators) and 2-bit weights.
  localparam int unsigned BITLEN_LOG2_DEF = 5;
  localparam int unsigned QBITS_DEF       = 2;

  // Largest neuron fan-in the elaboration functions handle.
  localparam int unsigned MAX_FANIN = 1024;
  // Largest number of weight levels (QBITS <= 4).
  localparam int unsigned MAX_LEVELS = 16;
  // Width of one signed weight level (-MAX_LEVELS..MAX_LEVELS).
  localparam int unsigned WL_W = 6;

  typedef logic signed [WL_W-1:0] wlevel_t;
  typedef logic [MAX_FANIN-1:0][WL_W-1:0] wvec_t;

  // Where one input's product goes inside its neuron, packed in 32 bits so
  // that elaboration-time arrays of it stay arrays of a basic type.
  typedef struct packed {
    logic        used;   // weight is non-zero
    logic        neg;    // weight is negative: product goes to the negative part
    logic [13:0] grp;    // SUC-Adder index within its polarity
    logic [5:0]  off;    // start of the weight window, in units
    logic [9:0]  gidx;   // index of the weight stream in the generator bank
  } asg_t;

  typedef int unsigned asg_arr_t [MAX_FANIN+2];

  function automatic int unsigned asg_pack(bit neg, int unsigned grp, int unsigned off,
                                           int unsigned gidx);
    return (1 << 31) | (int'(neg) << 30) | ((grp & 32'h3FFF) << 16)
         | ((off & 32'h3F) << 10) | (gidx & 32'h3FF);
  endfunction

  // Number of distinct shifted unary streams for `lv` levels.
  function automatic int unsigned num_gens(int unsigned lv);
    int unsigned s = 0;
    for (int unsigned l = 1; l <= lv; l++) s += lv / l;
    return s;
  endfunction

  // Bank index of the stream of level `level` starting at unit `off`
  // (`off` is a multiple of `level`).
  function automatic int unsigned gen_index(int unsigned lv, int unsigned level,
                                            int unsigned off);
    int unsigned s = 0;
    for (int unsigned l = 1; l < level; l++) s += lv / l;
    return s + off / level;
  endfunction

  function automatic int unsigned abs_level(logic [WL_W-1:0] w);
    wlevel_t s = wlevel_t'(w);
    return (s < 0) ? -int'(s) : int'(s);
  endfunction

  // Slots of a pack_groups() result past the per-input entries.
  localparam int unsigned ASG_NPOS = MAX_FANIN;      // positive SUC-Adders
  localparam int unsigned ASG_NNEG = MAX_FANIN + 1;  // negative SUC-Adders

  // Assign every non-zero weight of a neuron to a SUC-Adder and an offset.
  // Linked lists in flat arrays keep the elaboration-time cost linear in n.
  function automatic asg_arr_t pack_groups(wvec_t w, int unsigned n, int unsigned lv);
    asg_arr_t    asg;
    int unsigned lhead [2*MAX_LEVELS+2];  // inputs by polarity and level (+1, 0 = none)
    int unsigned lnext [MAX_FANIN];
    int unsigned ghead [MAX_LEVELS];      // open adders by free units (+1, 0 = none)
    int unsigned gnext [MAX_FANIN];
    int unsigned ngrp, g, off, l, i, r, key, base;
    wlevel_t     sl;
    bit          found;
    for (int k = 0; k < 2*MAX_LEVELS+2; k++) lhead[k] = 0;
    for (int k = int'(n) - 1; k >= 0; k--) begin
      sl = wlevel_t'(w[k]);
      l  = (sl < 0) ? -int'(sl) : int'(sl);
      if (l != 0) begin
        key        = ((sl < 0) ? MAX_LEVELS + 1 : 0) + l;
        lnext[k]   = lhead[key];
        lhead[key] = k + 1;
      end
    end
    for (int k = 0; k < MAX_FANIN; k++) asg[k] = 0;
    for (int p = 0; p < 2; p++) begin
      ngrp = 0;
      for (int k = 0; k < MAX_LEVELS; k++) ghead[k] = 0;
      for (l = lv; l >= 1; l--) begin
        i    = lhead[(p == 1 ? MAX_LEVELS + 1 : 0) + l];
        base = gen_index(lv, l, 0);
        while (i != 0) begin
          found = 0;
          g     = 0;
          off   = 0;
          for (r = l; r < lv && !found; r++) begin
            if (ghead[r] != 0 && ((lv - r) % l) == 0) begin
              found    = 1;
              g        = ghead[r] - 1;
              ghead[r] = gnext[g];
              off      = lv - r;
              if (r > l) begin
                gnext[g]   = ghead[r-l];
                ghead[r-l] = g + 1;
              end
            end
          end
          if (!found) begin
            g    = ngrp;
            ngrp = ngrp + 1;
            off  = 0;
            if (lv > l) begin
              gnext[g]    = ghead[lv-l];
              ghead[lv-l] = g + 1;
            end
          end
          asg[i-1] = (1 << 31) | (p << 30) | (g << 16) | (off << 10) | (base + off / l);
          i = lnext[i-1];
        end
      end
      asg[p == 1 ? ASG_NNEG : ASG_NPOS] = ngrp;
    end
    return asg;
  endfunction

  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Placeholder weight of input i of neuron j in layer `layer`, as a signed
  // level in -lv..lv (weight = level/lv). About half are zero and small
  // magnitudes dominate, as for retrained quantized weights.
  function automatic int weight_level(int unsigned layer, int unsigned j,
                                      int unsigned i, int unsigned lv);
    int unsigned h = mix(layer + 1, j, i);
    int unsigned a, b, m;
    if (h % 16 < 8) return 0;
    a = (h >> 8) % lv;
    b = (h >> 16) % lv;
    m = 1 + ((a < b) ? a : b);
    return h[31] ? -int'(m) : int'(m);
  endfunction

  // Placeholder bias of neuron j, in units of 1/2**BITLEN_LOG2, for the
  // positive (neg = 0) or negative (neg = 1) part. At most one is non-zero.
  function automatic int unsigned bias_units(int unsigned layer, int unsigned j,
                                             bit neg, int unsigned bitlen_log2);
    int unsigned h = mix(layer + 101, j, 7);
    if (h % 4 == 0) return 0;             // near-zero bias removed
    if (h[31] != neg) return 0;
    return (h >> 4) % (2 << bitlen_log2); // 0 .. just under 2.0
  endfunction

  // All weights of one neuron, packed for sc_neuron's W parameter.
  function automatic wvec_t neuron_weights(int unsigned layer, int unsigned j,
                                           int unsigned n, int unsigned lv);
    wvec_t w = '0;
    for (int unsigned i = 0; i < n; i++) w[i] = WL_W'(weight_level(layer, j, i, lv));
    return w;
  endfunction

  // Maximal-length Fibonacci LFSR feedback taps (bit k-1 set for tap k).
  function automatic int unsigned lfsr_taps(int unsigned width);
    case (width)
      2:  return 32'h3;
      3:  return 32'h6;
      4:  return 32'hC;
      5:  return 32'h14;
      6:  return 32'h30;
      7:  return 32'h60;
      8:  return 32'hB8;
      9:  return 32'h110;
      10: return 32'h240;
      11: return 32'h500;
      12: return 32'h829;
      13: return 32'h100D;
      14: return 32'h2015;
      15: return 32'h6000;
      16: return 32'hD008;
      default: return 32'h0;
    endcase
  endfunction

  // Non-zero LFSR seed for instance `k` of a `width`-bit LFSR.
  function automatic int unsigned lfsr_seed(int unsigned k, int unsigned width);
    int unsigned m = (1 << width) - 1;
    int unsigned s = mix(k, 55, width) & m;
    return (s == 0) ? 1 : s;
  endfunction

endpackage
