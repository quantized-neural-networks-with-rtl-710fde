// tb_sc_neuron: checks one 12-input stochastic neuron with a mix of weight
// levels of both signs (+4, +3, +2, +2, +1, +1, +1, -1, -2, -3, -4, 0) and a
// bias of +1.25 (40/32).
//  1. Static inputs: over one 32-cycle period the sum of acc must be
//     8 * sum(level_i * x_i) + 40 whatever the adder grouping.
//  2. Random input streams: acc must match the reference every cycle, and y
//     must equal (acc + 2 > r) one cycle later, r from a reference LFSR.
//  3. The sigmoid: over many periods the density of y must follow
//     clamp((acc+2)/4, 0, 1), the (x+2)/4 approximation.
module tb_sc_neuron;
  import sc_pkg::*;
  localparam int N = 12, BL2 = 5, Q = 2, LV = 4, SEED = 77;
  localparam int LEVS [N] = '{4, 3, 2, 2, 1, 1, 1, -1, -2, -3, -4, 0};
  localparam int BP = 40, BN = 0;

  function automatic logic [N-1:0][WL_W-1:0] mkw();
    logic [N-1:0][WL_W-1:0] r;
    for (int i = 0; i < N; i++) r[i] = WL_W'(LEVS[i]);
    return r;
  endfunction
  localparam logic [N-1:0][WL_W-1:0] W = mkw();

  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [N-1:0] x;
  logic [7:0] wbank;
  logic [BL2-1:0] tcnt;
  logic signed [5:0] acc;
  logic y;
  int checks = 0, failures = 0;

  sc_neuron #(.N_IN(N), .BITLEN_LOG2(BL2), .QBITS(Q), .W(W), .BIAS_POS(BP),
              .BIAS_NEG(BN), .RND_W(8), .SEED(SEED)) dut (.*);

  // Weight streams, from the formula (level, start unit) of each bank index.
  localparam int BLEV [8] = '{1, 1, 1, 1, 2, 2, 3, 4};
  localparam int BOFF [8] = '{0, 1, 2, 3, 0, 2, 0, 0};
  int t;
  always_comb begin
    for (int k = 0; k < 8; k++) wbank[k] = tb_ref_pkg::wbit(BLEV[k], BOFF[k], t, BL2, LV);
    tcnt = BL2'(t);
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wvec_t    wx;
    asg_arr_t asg;
    bit       xb [];
    int       sum, want, ra, ones;
    int unsigned rs;
    bit       yexp;
    wx  = wvec_t'(W);
    asg = pack_groups(wx, N, LV);
    xb  = new[N];
    t = 0;
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. Static inputs.
    for (int trial = 0; trial < 40; trial++) begin
      x = (trial == 0) ? '1 : (trial == 1) ? '0 : N'($urandom);
      restart = 1;
      @(posedge clk); #1;
      restart = 0;
      en = 1;
      sum = 0;
      for (t = 0; t < 32; t++) begin
        #1;
        sum += acc;
        @(posedge clk); #1;
      end
      en = 0;
      t = 0;
      want = BP - BN;
      for (int i = 0; i < N; i++) if (x[i]) want += 8 * LEVS[i];
      checks++;
      if (sum != want) begin
        failures++;
        $display("static x=%b: sum acc %0d want %0d", x, sum, want);
      end
    end

    // 2. Random streams, cycle by cycle.
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    en = 1;
    rs = SEED;
    for (t = 0; t < 320; t++) begin
      x = N'($urandom);
      for (int i = 0; i < N; i++) xb[i] = x[i];
      #1;
      ra = tb_ref_pkg::neuron_acc(wx, asg, N, xb, t, BP, BN, BL2, LV);
      checks++;
      if (acc != ra) begin
        failures++;
        $display("t %0d x=%b: acc %0d want %0d", t, x, acc, ra);
      end
      yexp = tb_ref_pkg::sigmoid_bit(ra, rs);
      @(posedge clk); #1;
      rs = tb_ref_pkg::lfsr_next(rs, 8);
      #1;
      checks++;
      if (y !== yexp) begin
        failures++;
        $display("t %0d: y %0b want %0b", t, y, yexp);
      end
    end

    // 3. Sigmoid: with static inputs the density of y must be the mean of
    //    clamp((acc+2)/4, 0, 1) over the period, within sampling noise.
    for (int trial = 0; trial < 4; trial++) begin
      real expect_ones;
      x = (trial == 0) ? '1 : N'($urandom);
      for (int i = 0; i < N; i++) xb[i] = x[i];
      restart = 1;
      @(posedge clk); #1;
      restart = 0;
      en = 1;
      ones = 0;
      expect_ones = 0.0;
      for (int c = 0; c < 255 * 4; c++) begin
        t = c;
        #1;
        ra = tb_ref_pkg::neuron_acc(wx, asg, N, xb, t, BP, BN, BL2, LV);
        expect_ones += (ra + 2 <= 0) ? 0.0 : (ra + 2 >= 4) ? 1.0 : (ra + 2) / 4.0;
        @(posedge clk); #1;
        #1;
        ones += y;
      end
      en = 0;
      checks++;
      if (ones < expect_ones - 60 || ones > expect_ones + 60) begin
        failures++;
        $display("sigmoid x=%b: %0d ones, expected about %0.1f", x, ones, expect_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
