// tb_suc_mae: accuracy of the SUC-Adder against an OR adder, the experiment
// of the mean-absolute-error table: (a+b+c+d)/4 and (a+...+h)/8 at stream
// lengths 16, 32, 64 and 128.
//
// For each length, K inputs come from sng instances (LFSR width = log2 of the
// length, different seeds) with random values. The SUC-Adder path gates them
// with the interleaved 1/K streams of a qweight_bank and ORs them
// (suc_adder); the OR-adder path gates them with 1/K streams from other SNGs
// and ORs them. Over 400 random input sets per length the testbench checks
//  * every SUC-Adder result equals the ones of input k inside window k,
//    summed over k (reference LFSR streams);
//  * the SUC-Adder MAE is below the OR adder's, and within a factor of two of
//    the values reported for this circuit (7.74/5.17/3.61/2.50 % for four
//    inputs, 8.16/5.60/3.88/2.69 % for eight);
//  * the MAE at length 128 is below that at length 16. With fixed LFSR
//    seeds the error is not monotonic in between: a window of a fixed
//    LFSR sequence has a fixed bias that depends on the length.
module tb_suc_mae;
  localparam int NT = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  real mae_suc [2][4], mae_or [2][4];
  int  done_cnt = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One experiment: K inputs (QB-bit weights, K = 2**QB) at length 2**BL2.
  for (genvar op = 0; op < 2; op++) begin : g_op
    for (genvar li = 0; li < 4; li++) begin : g_len
      localparam int QB  = op + 2;
      localparam int K   = 1 << QB;
      localparam int BL2 = li + 4;
      localparam int L   = 1 << BL2;
      localparam int NG  = sc_pkg::num_gens(K);
      logic [BL2-1:0] val [K];
      logic [K-1:0]   xs, cs;
      logic [NG-1:0]  wbank;
      logic [BL2-1:0] tcnt;
      logic           y_suc, y_or;
      logic           lrestart = 0, len_en = 0;

      for (genvar k = 0; k < K; k++) begin : g_in
        sng #(.WIDTH(BL2), .SEED(sc_pkg::lfsr_seed(k, BL2))) u_x (
          .clk, .rst_n, .restart(lrestart), .en(len_en), .value(val[k]), .bit_out(xs[k]));
        sng #(.WIDTH(BL2), .SEED(sc_pkg::lfsr_seed(k + 100, BL2))) u_c (
          .clk, .rst_n, .restart(lrestart), .en(len_en), .value(BL2'(L / K)), .bit_out(cs[k]));
      end
      qweight_bank #(.BITLEN_LOG2(BL2), .QBITS(QB)) u_bank (
        .clk, .rst_n, .restart(lrestart), .en(len_en), .wbank, .tcnt);
      // Level-1 streams are bank entries 0..K-1, phases 0..K-1.
      suc_adder #(.K(K)) u_suc (.x(xs), .w(wbank[K-1:0]), .y(y_suc));
      assign y_or = |(xs & cs);

      initial begin
        int unsigned s [K];
        int ref_cnt, n_suc, n_or;
        real exact, es = 0.0, eo = 0.0;
        wait (rst_n);
        @(posedge clk); #1;
        for (int trial = 0; trial < NT; trial++) begin
          exact = 0.0;
          for (int k = 0; k < K; k++) begin
            val[k] = BL2'($urandom);
            exact += real'(val[k]) / real'(L - 1) / K;
            s[k] = sc_pkg::lfsr_seed(k, BL2);
          end
          lrestart = 1;
          @(posedge clk); #1;
          lrestart = 0;
          len_en = 1;
          n_suc = 0;
          n_or = 0;
          ref_cnt = 0;
          for (int t = 0; t < L; t++) begin
            #1;
            for (int k = 0; k < K; k++)
              if (s[k] <= val[k] && tb_ref_pkg::wbit(1, k, t, BL2, K)) ref_cnt++;
            n_suc += y_suc;
            n_or += y_or;
            @(posedge clk); #1;
            for (int k = 0; k < K; k++) s[k] = tb_ref_pkg::lfsr_next(s[k], BL2);
          end
          len_en = 0;
          checks++;
          if (n_suc != ref_cnt) begin
            failures++;
            $display("K=%0d L=%0d trial %0d: SUC ones %0d want %0d", K, L, trial, n_suc, ref_cnt);
          end
          es += ((real'(n_suc) / L - exact) < 0) ? exact - real'(n_suc) / L : real'(n_suc) / L - exact;
          eo += ((real'(n_or) / L - exact) < 0) ? exact - real'(n_or) / L : real'(n_or) / L - exact;
        end
        mae_suc[op][li] = es / NT;
        mae_or[op][li] = eo / NT;
        done_cnt++;
      end
    end
  end

  initial begin
    real reported [2][4] = '{'{7.74, 5.17, 3.61, 2.50}, '{8.16, 5.60, 3.88, 2.69}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == 8);
    for (int op = 0; op < 2; op++) begin
      for (int li = 0; li < 4; li++) begin
        real ms, mo;
        ms = 100.0 * mae_suc[op][li];
        mo = 100.0 * mae_or[op][li];
        $display("%0d inputs, length %0d: MAE SUC-Adder %5.2f %%, OR adder %5.2f %% (reported %5.2f %%)",
                 4 << op, 16 << li, ms, mo, reported[op][li]);
        checks++;
        if (!(ms < mo)) begin
          failures++;
          $display("  SUC-Adder not better than the OR adder");
        end
        checks++;
        if (ms > 2.0 * reported[op][li] || ms < 0.5 * reported[op][li]) begin
          failures++;
          $display("  SUC-Adder MAE far from the reported value");
        end
        if (li == 3) begin
          checks++;
          if (!(mae_suc[op][3] < mae_suc[op][0])) begin
            failures++;
            $display("  MAE at length 128 not below length 16");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
