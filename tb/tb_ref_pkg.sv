// tb_ref_pkg: cycle-level reference models used by the testbenches.
//
// Written independently of the RTL datapath: its own LFSR polynomials, its
// own weight-window and bias-stream formulas. Only the configuration (the
// weights, biases, LFSR seeds and the adder packing chosen at elaboration)
// is taken from sc_pkg, since that is data, not logic.
package tb_ref_pkg;

  // Next state of a Fibonacci LFSR shifting left, XOR feedback. Taps are the
  // primitive polynomials x^4+x^3+1, x^5+x^3+1, x^6+x^5+1, x^7+x^6+1 and
  // x^8+x^6+x^5+x^4+1.
  function automatic int unsigned lfsr_next(int unsigned s, int unsigned width);
    bit fb;
    case (width)
      4: fb = s[3] ^ s[2];
      5: fb = s[4] ^ s[2];
      6: fb = s[5] ^ s[4];
      7: fb = s[6] ^ s[5];
      8: fb = s[7] ^ s[5] ^ s[4] ^ s[3];
      default: fb = 0;
    endcase
    return ((s << 1) | fb) & ((1 << width) - 1);
  endfunction

  // Shifted unary weight stream: level l, window starting at unit `off`,
  // at cycle t of a 2**bl2 period with lv levels.
  function automatic bit wbit(int l, int off, int t, int bl2, int lv);
    int period = 1 << bl2;
    int unit   = period / lv;
    int pos    = ((t % period) - off * unit + period) % period;
    return pos < l * unit;
  endfunction

  // Fractional bias stream: ones where the bit-reversed cycle count is below
  // the fraction.
  function automatic bit biasbit(int units, int t, int bl2);
    int period = 1 << bl2;
    int tt = t % period, rev = 0;
    for (int b = 0; b < bl2; b++) if (tt[b]) rev |= 1 << (bl2 - 1 - b);
    return rev < (units % period);
  endfunction

  // acc of one neuron at cycle t for input bits x.
  function automatic int neuron_acc(sc_pkg::wvec_t w, sc_pkg::asg_arr_t asg, int n,
                                    bit x[], int t, int bias_pos, int bias_neg,
                                    int bl2, int lv);
    int acc = 0;
    sc_pkg::asg_t e;
    for (int i = 0; i < n; i++) begin
      int lev = sc_pkg::wlevel_t'(w[i]);
      if (lev != 0) begin
        e = sc_pkg::asg_t'(asg[i]);
        if (x[i] && wbit(lev < 0 ? -lev : lev, int'(e.off), t, bl2, lv))
          acc += (lev < 0) ? -1 : 1;
      end
    end
    acc += (bias_pos >> bl2) + int'(biasbit(bias_pos, t, bl2));
    acc -= (bias_neg >> bl2) + int'(biasbit(bias_neg, t, bl2));
    return acc;
  endfunction

  // Sigmoid comparator: (acc + 2) / 4 with a 2-bit random number.
  function automatic bit sigmoid_bit(int acc, int unsigned rnd);
    return (acc + 2) > int'(rnd & 3);
  endfunction

endpackage
