// tb_qweight_bank: checks the bank of shifted unary streams for 32-cycle
// streams and 2-bit weights: eight streams, ordered level 1 (phases 0..3),
// level 2 (phases 0, 2), level 3, level 4; each high for level*8 cycles
// starting at phase*8; streams of one level never overlap; tcnt counts the
// cycle within the period.
module tb_qweight_bank;
  localparam int BL2 = 5, Q = 2;
  // Expected (level, start unit) of each bank index.
  localparam int LEV [8] = '{1, 1, 1, 1, 2, 2, 3, 4};
  localparam int OFF [8] = '{0, 1, 2, 3, 0, 2, 0, 0};
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [7:0] wbank;
  logic [BL2-1:0] tcnt;
  int checks = 0, failures = 0;

  qweight_bank #(.BITLEN_LOG2(BL2), .QBITS(Q)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    en = 1;
    for (int t = 0; t < 96; t++) begin
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (wbank[k] !== tb_ref_pkg::wbit(LEV[k], OFF[k], t, BL2, 4)) begin
          failures++;
          $display("t %0d stream %0d: got %0b", t, k, wbank[k]);
        end
      end
      checks++;
      if ($countones(wbank[3:0]) != 1 || $countones(wbank[5:4]) != 1) begin
        failures++;
        $display("t %0d: interleaved streams overlap or leave a gap", t);
      end
      checks++;
      if (tcnt !== BL2'(t)) begin
        failures++;
        $display("t %0d: tcnt %0d", t, tcnt);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
