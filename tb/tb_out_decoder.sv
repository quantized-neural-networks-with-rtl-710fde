// tb_out_decoder: checks the output counters and the class decision: random
// output streams counted only while `en` is high, cleared by `clear`,
// arg-max with the lowest index winning a tie.
module tb_out_decoder;
  localparam int N = 10, BL2 = 5;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [N-1:0] y;
  logic [N-1:0][BL2:0] counts;
  logic [3:0] class_id;
  int checks = 0, failures = 0;

  out_decoder #(.N(N), .BITLEN_LOG2(BL2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt [N];
    int best;
    y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int img = 0; img < 20; img++) begin
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      for (int k = 0; k < N; k++) ref_cnt[k] = 0;
      for (int t = 0; t < 40; t++) begin
        en = (t % 5 != 4);
        // Biased streams so that classes differ; image 3 gives a tie.
        for (int k = 0; k < N; k++)
          y[k] = (img == 3) ? (k == 2 || k == 6) : (($urandom % 16) < ((k * 7 + img) % 16));
        if (en) for (int k = 0; k < N; k++) ref_cnt[k] += y[k];
        @(posedge clk); #1;
      end
      en = 0;
      #1;
      best = 0;
      for (int k = 1; k < N; k++) if (ref_cnt[k] > ref_cnt[best]) best = k;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (counts[k] !== 6'(ref_cnt[k])) begin
          failures++;
          $display("img %0d class %0d: count %0d want %0d", img, k, counts[k], ref_cnt[k]);
        end
      end
      checks++;
      if (class_id !== 4'(best)) begin
        failures++;
        $display("img %0d: class %0d want %0d", img, class_id, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
