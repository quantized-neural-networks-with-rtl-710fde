// tb_sng: checks the stochastic number generator. Over one full LFSR period
// (31 cycles for 5 bits) the stream must hold exactly `value` ones, and each
// bit must equal (reference LFSR state <= value).
module tb_sng;
  localparam int unsigned W = 5;
  localparam int unsigned SEED = 9;
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [W-1:0] value;
  logic bit_out;
  int checks = 0, failures = 0;

  sng #(.WIDTH(W), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s, ones;
    value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 32; v += (v < 4 ? 1 : 3)) begin
      value = W'(v);
      restart = 1;
      @(posedge clk); #1;
      restart = 0;
      en = 1;
      s = SEED;
      ones = 0;
      for (int c = 0; c < 31; c++) begin
        #1;
        checks++;
        if (bit_out !== (s <= v)) begin
          failures++;
          $display("value %0d cycle %0d: got %0b want %0b", v, c, bit_out, s <= v);
        end
        ones += bit_out;
        @(posedge clk); #1;
        s = tb_ref_pkg::lfsr_next(s, W);
      end
      en = 0;
      checks++;
      if (ones != v) begin
        failures++;
        $display("value %0d: %0d ones in one period", v, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
