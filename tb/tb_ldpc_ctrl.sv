// tb_ldpc_ctrl: controller test at P = 4 with an iteration limit of 6. The
// testbench plays the SNR comparator (check_en = iter >= min) and the
// parity unit (the first nfail parity phases fail). For several (min, nfail)
// pairs it builds the expected phase sequence and compares, cycle by
// cycle: the active phase, agu_start, first_iter, tent_en, pc_clear, the
// unload read addresses, and at done the success flag, iterations and
// number of parity phases.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int P = 4, MAXI = 6, BAW = $clog2(2*P), PH = 6*P + 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, llr_we, lut_load, check_en, first_iter;
  logic [BAW-1:0] llr_waddr, dm_raddr_out, out_addr;
  iter_t iter, iters, par_runs;
  agu_mode_e agu_mode;
  logic agu_start, phase_check, phase_bit, phase_parity, tent_start, tent_en, pc_clear, pc_fail;
  logic dm_re_out, out_valid, busy, done, success;
  ldpc_ctrl #(.P(P), .MAX_IT(MAXI)) dut (.*);

  int checks = 0, failures = 0;
  int min_t = 1, nfail = 0, par_seen = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  assign check_en = (int'(iter) >= min_t) || (int'(iter) >= MAXI);

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic frame(input int mn, input int nf);
    int ph[$];    // 0 check, 1 bit, 2 parity, per phase
    int it[$];
    int e_it, e_par;
    bit e_ok;
    min_t = mn; nfail = nf; par_seen = 0;
    e_ok = 0; e_par = 0; e_it = 0;
    for (int k = 1; k <= MAXI && !e_ok; k++) begin
      e_it = k;
      ph.push_back(0); it.push_back(k);
      ph.push_back(1); it.push_back(k);
      if (k >= mn || k == MAXI) begin
        ph.push_back(2); it.push_back(k);
        e_par++;
        if (e_par > nf) e_ok = 1;
      end
    end
    for (int b = 0; b < 2*P; b++) begin
      in_valid <= 1;
      @(posedge clk);
      #1;
      ck(llr_we === 1'b0 || int'(llr_waddr) == b + 1 || b == 2*P-1, "load address");
    end
    in_valid <= 0;
    foreach (ph[j]) begin
      for (int c = 0; c < PH; c++) begin
        bit en;
        en = (it[j] >= mn) || (it[j] == MAXI);
        ck(phase_check == (ph[j] == 0) && phase_bit == (ph[j] == 1) && phase_parity == (ph[j] == 2),
           $sformatf("phase %0d cycle %0d", j, c));
        ck(agu_start == (c == 0), "agu_start");
        ck(int'(iter) == it[j], "iter");
        ck(first_iter == (it[j] == 1), "first_iter");
        ck(tent_en == (ph[j] == 1 && en), "tent_en");
        ck(pc_clear == (ph[j] == 2 && c == 0), "pc_clear");
        @(posedge clk);
        #1;
        if (ph[j] == 2 && c == PH - 1) par_seen++;   // result taken at that edge
      end
    end
    for (int c = 0; c <= 2*P; c++) begin
      ck(dm_re_out == (c < 2*P), "unload read");
      if (c < 2*P) ck(int'(dm_raddr_out) == c, "unload address");
      if (c > 0) ck(out_valid && int'(out_addr) == c - 1, "out_valid/addr");
      ck(done == (c == 2*P), "done");
      if (c == 2*P) begin
        ck(success == e_ok, "success");
        ck(int'(iters) == e_it, $sformatf("iters %0d exp %0d", iters, e_it));
        ck(int'(par_runs) == e_par, "par_runs");
      end
      @(posedge clk);
      #1;
    end
    ck(!busy && in_ready, "back to idle");
  endtask

  // parity result: fail while fewer than nfail+1 parity phases have ended
  always_comb pc_fail = (par_seen < nfail);

  initial begin
    in_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    frame(1, 0);   // parity in iteration 1 passes
    frame(3, 0);   // two iterations without parity, pass in 3
    frame(2, 2);   // parity fails twice, pass in iteration 4
    frame(5, 9);   // never passes: stops at the limit
    frame(50, 0);  // minimum beyond the limit: parity only in the last iteration
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
