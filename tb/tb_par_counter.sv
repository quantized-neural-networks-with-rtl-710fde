// tb_par_counter: checks the parallel counter against a bit-by-bit count
// for all-zero, all-one and random 13-bit inputs.
module tb_par_counter;
  localparam int N = 13;
  logic [N-1:0] bits;
  logic [3:0] count;
  int checks = 0, failures = 0;

  par_counter #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int v = 0; v < 300; v++) begin
      bits = (v == 0) ? '0 : (v == 1) ? '1 : N'($urandom);
      #1;
      want = 0;
      for (int k = 0; k < N; k++) want += bits[k];
      checks++;
      if (count !== 4'(want)) begin
        failures++;
        $display("bits=%b count=%0d want %0d", bits, count, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
