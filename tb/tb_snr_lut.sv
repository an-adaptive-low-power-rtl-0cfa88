// tb_snr_lut: for every SNR index (and two out-of-range ones) and every
// iteration 1..50, checks the minimum-iteration and alpha tables against
// the values of the iteration-count table, and the check enable
// (iter >= min or iter == 50). Also checks that the index is held between
// loads.
module tb_snr_lut;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load; snr_idx_t snr_idx; iter_t iter, min_iter; alpha_t alpha; logic check_en;
  snr_lut dut (.*);
  int checks = 0, failures = 0;
  // Table: minimum iterations at -1, -0.5, ..., 12 dB
  int tab [27] = '{50, 50, 50, 50, 42, 10, 6, 4, 4, 4, 3, 2, 2, 2, 2, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1};
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    load = 0; snr_idx = 0; iter = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 29; k++) begin
      int kk, ea;
      kk = (k > 26) ? 26 : k;
      ea = (kk < 6) ? 12 : (kk < 11 ? 13 : 14);
      load <= 1; snr_idx <= snr_idx_t'(k);
      @(posedge clk);
      load <= 0; snr_idx <= snr_idx_t'(3);   // must not be taken without load
      @(posedge clk);
      for (int it = 1; it <= 50; it++) begin
        iter = iter_t'(it);
        #1;
        checks++;
        if (check_en !== (it >= tab[kk] || it == 50)) begin
          failures++; $display("FAIL check_en idx %0d iter %0d", k, it);
        end
      end
      checks += 2;
      if (int'(min_iter) != tab[kk]) begin failures++; $display("FAIL min_iter idx %0d", k); end
      if (int'(alpha) != ea) begin failures++; $display("FAIL alpha idx %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
