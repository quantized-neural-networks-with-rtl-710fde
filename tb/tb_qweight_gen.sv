// tb_qweight_gen: checks quantized weight generators of 16-cycle and 32-cycle
// periods at several lengths and phases: after restart the output must be
// high exactly in cycles PHASE..PHASE+LEN-1 (mod period) of every period,
// and hold while `en` is low.
module tb_qweight_gen;
  localparam int N = 6;
  localparam int CW [N] = '{4, 4, 4, 4, 5, 5};     // counter width
  localparam int CL [N] = '{4, 4, 12, 16, 8, 24};  // ones per period
  localparam int CP [N] = '{0, 12, 4, 0, 24, 8};   // phase
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic [N-1:0] w;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < N; k++) begin : g
    logic [CW[k]-1:0] cnt;
    qweight_gen #(.WIDTH(CW[k]), .LEN(CL[k]), .PHASE(CP[k])) dut (
      .clk, .rst_n, .restart, .en, .w(w[k]), .cnt);
  end

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_w(int k, int t);
    int p = 1 << CW[k];
    return ((t - CP[k]) % p + p) % p < CL[k];
  endfunction

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    restart = 1;
    @(posedge clk); #1;
    restart = 0;
    t = 0;
    for (int c = 0; c < 100; c++) begin
      en = (c % 7 != 3);   // a few idle cycles
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (w[k] !== expect_w(k, t)) begin
          failures++;
          $display("gen %0d t %0d: got %0b want %0b", k, t, w[k], expect_w(k, t));
        end
      end
      @(posedge clk); #1;
      if (en) t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
