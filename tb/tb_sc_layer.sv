// tb_sc_layer: checks a 16-input, 6-neuron layer with the placeholder
// weights of layer 1. Random input streams; every neuron's output bit must
// match the reference neuron (weights, biases and seed of neuron j of that
// layer) every cycle.
module tb_sc_layer;
  import sc_pkg::*;
  localparam int NI = 16, NO = 6, LAYER = 1, BL2 = 5, Q = 2, LV = 4;

  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [NI-1:0] x;
  logic [7:0] wbank;
  logic [BL2-1:0] tcnt;
  logic [NO-1:0] y;
  int checks = 0, failures = 0;

  sc_layer #(.N_IN(NI), .N_OUT(NO), .LAYER(LAYER), .BITLEN_LOG2(BL2), .QBITS(Q),
             .RND_W(8)) dut (.*);

  localparam int BLEV [8] = '{1, 1, 1, 1, 2, 2, 3, 4};
  localparam int BOFF [8] = '{0, 1, 2, 3, 0, 2, 0, 0};
  int t;
  always_comb begin
    for (int k = 0; k < 8; k++) wbank[k] = tb_ref_pkg::wbit(BLEV[k], BOFF[k], t, BL2, LV);
    tcnt = BL2'(t);
  end

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wvec_t       w [NO];
    asg_arr_t    asg [NO];
    int          bp [NO], bn [NO];
    int unsigned rs [NO];
    bit          yexp [NO];
    bit          xb [];
    int          ra, ones;
    xb = new[NI];
    for (int j = 0; j < NO; j++) begin
      w[j]   = neuron_weights(LAYER, j, NI, LV);
      asg[j] = pack_groups(w[j], NI, LV);
      bp[j]  = bias_units(LAYER, j, 1'b0, BL2);
      bn[j]  = bias_units(LAYER, j, 1'b1, BL2);
      rs[j]  = lfsr_seed(LAYER * 4096 + j, 8);
    end
    t = 0;
    x = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    en = 1;
    ones = 0;
    for (t = 0; t < 400; t++) begin
      x = NI'($urandom);
      for (int i = 0; i < NI; i++) xb[i] = x[i];
      #1;
      for (int j = 0; j < NO; j++) begin
        ra = tb_ref_pkg::neuron_acc(w[j], asg[j], NI, xb, t, bp[j], bn[j], BL2, LV);
        yexp[j] = tb_ref_pkg::sigmoid_bit(ra, rs[j]);
        rs[j] = tb_ref_pkg::lfsr_next(rs[j], 8);
      end
      @(posedge clk); #1;
      for (int j = 0; j < NO; j++) begin
        checks++;
        ones += y[j];
        if (y[j] !== yexp[j]) begin
          failures++;
          $display("t %0d neuron %0d: y %0b want %0b", t, j, y[j], yexp[j]);
        end
      end
    end
    checks++;
    if (ones == 0 || ones == 400 * NO) begin
      failures++;
      $display("layer outputs are constant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
