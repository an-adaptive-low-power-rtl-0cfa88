// tb_ldpc_decoder: self-checking test of the decoder at P = 64 (1024 bits,
// 512 checks) against the flat reference model in ldpc_ref_pkg.
//
// Frames of the all-zero codeword (negative LLRs) with Gaussian noise at
// several noise levels are decoded with several SNR indices. For each frame
// the decisions, the iteration count, the number of parity phases, the
// success flag, the table outputs and the exact cycle count from the last
// LLR word to done (phases of 6P + 9 cycles, unload 2P + 1) are checked.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P   = 64;
  localparam int NB  = 16 * P;
  localparam int BAW = $clog2(2*P);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  snr_idx_t       snr_idx;
  logic           llr_valid, llr_ready;
  msg_t           llr_in [LANES];
  logic           out_valid, busy, done, success;
  logic [BAW-1:0] out_addr;
  logic           out_bits [LANES];
  iter_t          iters, par_runs, min_iter;
  alpha_t         alpha;

  ldpc_decoder #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int llr[];
  bit got[];
  int n_skip = 0, n_parfail = 0, n_success = 0, n_maxit = 0;

  task automatic run_frame(input real sigma, input int idx);
    bit ref_dec[];
    int r_it, r_par;
    bit r_ok;
    longint t_acc, t_done;
    llr = new[NB];
    got = new[NB];
    for (int n = 0; n < NB; n++) begin
      real y = -1.0 + sigma * gauss();
      llr[n] = sat31(int'(y * 8.0));
    end
    begin
      int mi, al;
      mi = REF_MIN_ITER[idx];
      al = ref_alpha(idx);
      ref_decode(P, MAX_ITER, llr, mi, al, ref_dec, r_it, r_par, r_ok);
    end

    snr_idx = snr_idx_t'(idx);
    for (int b = 0; b < 2*P; b++) begin
      llr_valid <= 1'b1;
      for (int k = 0; k < LANES; k++) llr_in[k] <= msg_t'(llr[k*2*P + b]);
      @(posedge clk);
      while (!llr_ready) @(posedge clk);
    end
    t_acc = cyc - 1;
    llr_valid <= 1'b0;
    do begin
      @(posedge clk);
      if (out_valid) begin
        int a;
        a = int'(out_addr);
        for (int k = 0; k < LANES; k++) begin
          bit v;
          v = out_bits[k];
          got[k*2*P + a] = v;
        end
      end
    end while (!done);
    t_done = cyc - 1;

    begin
      int mism = 0;
      for (int n = 0; n < NB; n++) if (got[n] != ref_dec[n]) mism++;
      check(mism == 0, $sformatf("sigma %0.2f idx %0d: %0d decision mismatches", sigma, idx, mism));
    end
    check(int'(iters) == r_it, $sformatf("iters %0d, expected %0d", iters, r_it));
    check(int'(par_runs) == r_par, $sformatf("par_runs %0d, expected %0d", par_runs, r_par));
    check(success == r_ok, $sformatf("success %0d, expected %0d", success, r_ok));
    check(int'(min_iter) == REF_MIN_ITER[idx], "min_iter table");
    check(int'(alpha) == ref_alpha(idx), "alpha table");
    check(t_done - t_acc == longint'((6*P + 9) * (2*r_it + r_par) + 2*P + 1),
          $sformatf("cycles %0d, expected %0d", t_done - t_acc, (6*P + 9) * (2*r_it + r_par) + 2*P + 1));
    if (r_par < r_it) n_skip++;
    if (r_par > 1 || !r_ok) n_parfail++;
    if (r_ok) n_success++;
    if (r_it == MAX_ITER) n_maxit++;
    $display("frame sigma=%0.2f idx=%0d: iters=%0d parity_runs=%0d success=%0d cycles=%0d",
             sigma, idx, iters, par_runs, success, t_done - t_acc);
    @(posedge clk);
  endtask

  initial begin
    llr_valid = 1'b0;
    snr_idx   = '0;
    for (int k = 0; k < LANES; k++) llr_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0.30, 26);   // clean: decodes in the first iteration
    run_frame(0.70, 26);   // parity checked every iteration
    run_frame(0.70, 6);    // first 5 iterations skip tentative + parity
    run_frame(0.80, 9);
    run_frame(0.85, 5);    // 10 skipped iterations
    run_frame(1.40, 12);   // too noisy: runs to the iteration limit
    run_frame(1.40, 0);    // parity only in iteration 50
    check(n_skip > 0,    "no frame skipped a parity check");
    check(n_parfail > 0, "no parity check failed");
    check(n_success > 0, "no frame decoded");
    check(n_maxit > 0,   "no frame hit the iteration limit");
    $display("mechanisms: skipped=%0d parity_fail=%0d success=%0d max_iter=%0d",
             n_skip, n_parfail, n_success, n_maxit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
