// tb_qsnn_rbm: end-to-end test of the classifier at a reduced size
// (24-12-10-4, 32-cycle streams, 2-bit weights).
//
// A cycle-level reference of the whole network (pixel LFSRs, weight windows,
// bias streams, neuron comparators, layer registers, output counters) gives
// the expected counts and class for each image. Also checked: `done` comes
// 35 cycles (32 + 3 pipeline cycles) after the start edge, `busy` is high in
// between, a start while busy is ignored, and an image started on the `done`
// cycle runs normally. The reference counts how often each mechanism
// occurred (adders shared by several products, negative products, bias
// stream bits, comparator saturated high / low / in its linear range); a
// mechanism that never occurs is a failure.
module tb_qsnn_rbm;
  import sc_pkg::*;
  localparam int NI = 24, NH1 = 12, NH2 = 10, NO = 4;
  localparam int BL2 = 5, Q = 2, LV = 4, L = 32, PIXW = 8;
  localparam int NIMG = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NI-1:0][PIXW-1:0] pixels;
  logic busy, done;
  logic [NO-1:0][BL2:0] counts;
  logic [1:0] class_id;
  int checks = 0, failures = 0;

  qsnn_rbm #(.N_IN(NI), .N_H1(NH1), .N_H2(NH2), .N_OUT(NO), .BITLEN_LOG2(BL2),
             .QBITS(Q), .PIX_W(PIXW), .RND_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference network configuration.
  localparam int NL = 3;
  localparam int LIN [NL]  = '{NI, NH1, NH2};
  localparam int LOUT [NL] = '{NH1, NH2, NO};
  wvec_t    rw   [NL][];
  asg_arr_t ra   [NL][];
  int       rbp  [NL][], rbn [NL][];

  // Mechanism counters.
  int n_shared_adders = 0, n_neg_products = 0, n_bias_bits = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_linear = 0, n_busy_start = 0, n_b2b = 0;

  task automatic build_reference();
    for (int l = 0; l < NL; l++) begin
      rw[l] = new[LOUT[l]];
      ra[l] = new[LOUT[l]];
      rbp[l] = new[LOUT[l]];
      rbn[l] = new[LOUT[l]];
      for (int j = 0; j < LOUT[l]; j++) begin
        int members [2][];
        rw[l][j]  = neuron_weights(l, j, LIN[l], LV);
        ra[l][j]  = pack_groups(rw[l][j], LIN[l], LV);
        rbp[l][j] = bias_units(l, j, 1'b0, BL2);
        rbn[l][j] = bias_units(l, j, 1'b1, BL2);
        members[0] = new[LIN[l]];
        members[1] = new[LIN[l]];
        for (int i = 0; i < LIN[l]; i++) begin
          asg_t e = asg_t'(ra[l][j][i]);
          if (e.used) members[e.neg][e.grp]++;
        end
        for (int p = 0; p < 2; p++)
          for (int g = 0; g < LIN[l]; g++) if (members[p][g] > 1) n_shared_adders++;
      end
    end
  endtask

  // Expected counts of one image.
  task automatic run_reference(input logic [NI-1:0][PIXW-1:0] pix, output int cnt [NO]);
    int unsigned sng_s [NI];
    int unsigned rs [NL][];
    bit          act [NL+1][];   // act[0]: pixel streams; act[l+1]: layer l outputs
    bit          nxt [NL][];
    int          acc;
    for (int i = 0; i < NI; i++) sng_s[i] = lfsr_seed(i, BL2);
    act[0] = new[NI];
    for (int l = 0; l < NL; l++) begin
      rs[l]    = new[LOUT[l]];
      act[l+1] = new[LOUT[l]];
      nxt[l]   = new[LOUT[l]];
      for (int j = 0; j < LOUT[l]; j++) begin
        rs[l][j] = lfsr_seed(l * 4096 + j, 8);
        act[l+1][j] = 0;
      end
    end
    for (int k = 0; k < NO; k++) cnt[k] = 0;
    for (int c = 0; c < L + 3; c++) begin
      for (int i = 0; i < NI; i++) act[0][i] = sng_s[i] <= (pix[i] >> (PIXW - BL2));
      for (int l = 0; l < NL; l++) begin
        for (int j = 0; j < LOUT[l]; j++) begin
          acc = tb_ref_pkg::neuron_acc(rw[l][j], ra[l][j], LIN[l], act[l], c,
                                       rbp[l][j], rbn[l][j], BL2, LV);
          nxt[l][j] = tb_ref_pkg::sigmoid_bit(acc, rs[l][j]);
          if (acc + 2 >= 4) n_sat_hi++;
          else if (acc + 2 <= 0) n_sat_lo++;
          else n_linear++;
          if (tb_ref_pkg::biasbit(rbp[l][j], c, BL2) || tb_ref_pkg::biasbit(rbn[l][j], c, BL2))
            n_bias_bits++;
          for (int i = 0; i < LIN[l]; i++) begin
            int lev = wlevel_t'(rw[l][j][i]);
            asg_t e = asg_t'(ra[l][j][i]);
            if (lev < 0 && act[l][i] && tb_ref_pkg::wbit(-lev, int'(e.off), c, BL2, LV))
              n_neg_products++;
          end
        end
      end
      if (c >= 3) for (int k = 0; k < NO; k++) cnt[k] += act[NL][k];
      for (int l = 0; l < NL; l++)
        for (int j = 0; j < LOUT[l]; j++) begin
          act[l+1][j] = nxt[l][j];
          rs[l][j] = tb_ref_pkg::lfsr_next(rs[l][j], 8);
        end
      for (int i = 0; i < NI; i++) sng_s[i] = tb_ref_pkg::lfsr_next(sng_s[i], BL2);
    end
  endtask

  task automatic check_image(int img, int cycles, int cnt [NO]);
    int best = 0;
    for (int k = 1; k < NO; k++) if (cnt[k] > cnt[best]) best = k;
    checks++;
    if (cycles != L + 3) begin
      failures++;
      $display("image %0d: done after %0d cycles, expected %0d", img, cycles, L + 3);
    end
    for (int k = 0; k < NO; k++) begin
      checks++;
      if (counts[k] !== (BL2+1)'(cnt[k])) begin
        failures++;
        $display("image %0d output %0d: count %0d want %0d", img, k, counts[k], cnt[k]);
      end
    end
    checks++;
    if (class_id !== 2'(best)) begin
      failures++;
      $display("image %0d: class %0d want %0d", img, class_id, best);
    end
  endtask

  initial begin
    int cnt [NO];
    int cycles;
    int total_ones = 0;
    build_reference();
    pixels = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int img = 0; img < NIMG; img++) begin
      // Images of different brightness; image 0 is blank, image 1 saturated.
      for (int i = 0; i < NI; i++)
        pixels[i] = (img == 0) ? 8'd0 : (img == 1) ? 8'd255 :
                    (($urandom % 8) < (img % 8)) ? 8'($urandom) : 8'd0;
      run_reference(pixels, cnt);
      if (!done) begin
        start = 1;
        @(posedge clk); #1;
      end else begin
        // Back-to-back: start on the done cycle of the previous image.
        n_b2b++;
        start = 1;
        @(posedge clk); #1;
      end
      start = 0;
      cycles = 1;
      while (!done) begin
        checks++;
        if (!busy) begin
          failures++;
          $display("image %0d: busy low while running", img);
        end
        // A start while busy must be ignored.
        if (cycles == 10 && img % 3 == 2) begin
          start = 1;
          n_busy_start++;
        end else start = 0;
        @(posedge clk); #1;
        cycles++;
      end
      start = 0;
      // cycles counts edges from the start edge to done, minus the
      // start edge itself.
      check_image(img, cycles - 1, cnt);
      for (int k = 0; k < NO; k++) total_ones += cnt[k];
      // Every other image starts on the done cycle, the others after a gap.
      if (img % 2 == 1) begin
        @(posedge clk); #1;
        @(posedge clk); #1;
      end
    end
    $display("mechanisms: shared adders %0d, negative products %0d, bias bits %0d,",
             n_shared_adders, n_neg_products, n_bias_bits);
    $display("  comparator high %0d low %0d linear %0d, start while busy %0d, back-to-back %0d",
             n_sat_hi, n_sat_lo, n_linear, n_busy_start, n_b2b);
    checks++;
    if (n_shared_adders == 0 || n_neg_products == 0 || n_bias_bits == 0 || n_sat_hi == 0 ||
        n_sat_lo == 0 || n_linear == 0 || n_busy_start == 0 || n_b2b == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    checks++;
    if (total_ones == 0) begin
      failures++;
      $display("all output streams were zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
