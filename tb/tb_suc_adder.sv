// tb_suc_adder: checks the shifted unary code adder. First every input
// combination of a 4-input adder; then the four-term example
// (a+b+c+d)/4: four random streams each gated by a quarter-period window
// at its own phase must give, over the period, exactly the ones of a in
// window 0 plus b in window 1 plus c in window 2 plus d in window 3.
module tb_suc_adder;
  localparam int K = 4;
  logic [K-1:0] x, w;
  logic y;
  int checks = 0, failures = 0;

  suc_adder #(.K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, want;
    bit e;
    for (int v = 0; v < 256; v++) begin
      {x, w} = 8'(v);
      #1;
      e = 0;
      for (int k = 0; k < K; k++) if (x[k] && w[k]) e = 1;
      checks++;
      if (y !== e) begin
        failures++;
        $display("x=%b w=%b y=%b", x, w, y);
      end
    end
    for (int trial = 0; trial < 20; trial++) begin
      bit [31:0] s [K];
      for (int k = 0; k < K; k++) s[k] = $urandom;
      got = 0;
      want = 0;
      for (int t = 0; t < 32; t++) begin
        for (int k = 0; k < K; k++) begin
          x[k] = s[k][t];
          w[k] = tb_ref_pkg::wbit(1, k, t, 5, 4);
          if (w[k] && x[k]) want++;
        end
        #1;
        got += y;
      end
      checks++;
      if (got != want) begin
        failures++;
        $display("trial %0d: %0d ones, expected %0d", trial, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
