// tb_ldpc_rx_top: end-to-end test of the receiver at its default size
// (P = 576: 9216-bit frames, 4608 checks, up to 50 iterations).
//
// Each frame is a SOF header with Gaussian noise followed by the LLRs of
// the all-zero codeword with Gaussian noise. The SNR index the estimator
// reports is checked against a floating-point SNV estimate of the same
// samples; the decoder's decisions, iteration count, parity phases,
// success flag and exact cycle count are checked against the flat
// reference model run with the table entries for that index. Counts how
// often each mechanism occurred (iterations with skipped tentative/parity,
// failed parity phases, early success, the iteration limit, distinct
// alpha values) and fails if one never did.
module tb_ldpc_rx_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P   = 576;
  localparam int NB  = 16 * P;
  localparam int BAW = $clog2(2*P);
  localparam logic [25:0] SOF = 26'h18D2E82;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              sof_start, sym_valid, snr_valid;
  logic signed [7:0] sym;
  snr_idx_t          snr_idx;
  logic              llr_valid, llr_ready;
  msg_t              llr_in [LANES];
  logic              out_valid, busy, done, success;
  logic [BAW-1:0]    out_addr;
  logic              out_bits [LANES];
  iter_t             iters, par_runs, min_iter;
  alpha_t            alpha;

  ldpc_rx_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
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

  int n_skip = 0, n_parfail = 0, n_success = 0, n_maxit = 0;
  int alpha_seen [17];

  // Send a SOF at the given SNR (dB); return the estimator's index.
  task automatic send_sof(input real snr_db, output int idx);
    real sigma, a, b, db;
    int r, c, exp_idx;
    bit near;
    sigma = 40.0 / $sqrt($pow(10.0, snr_db / 10.0));
    a = 0.0; b = 0.0;
    for (int m = 0; m < 26; m++) begin
      c = SOF[25 - m] ? -1 : 1;
      r = int'(40.0 * real'(c) + sigma * gauss());
      if (r > 127) r = 127;
      if (r < -128) r = -128;
      a += real'(r * c);
      b += real'(r * r);
      sof_start <= (m == 0); sym_valid <= 1'b1; sym <= 8'(r);
      @(posedge clk);
    end
    sof_start <= 1'b0; sym_valid <= 1'b0;
    while (!snr_valid) @(posedge clk);
    #1;
    a = a / 26.0; b = b / 26.0;
    db = (b - a*a <= 0.0) ? 100.0 : 10.0 * $log10(a*a / (b - a*a));
    exp_idx = 0; near = 0;
    for (int k = 0; k < 27; k++) begin
      real g;
      g = -1.0 + 0.5 * real'(k);
      if (db > g) exp_idx = k + 1;
      if (db - g < 0.01 && g - db < 0.01) near = 1;
    end
    if (exp_idx > 26) exp_idx = 26;
    if (!near) check(int'(snr_idx) == exp_idx, $sformatf("SNR index %0d, expected %0d", snr_idx, exp_idx));
    idx = int'(snr_idx);
    @(posedge clk);
  endtask

  task automatic run_frame(input real sof_db, input real sigma);
    int llr[];
    bit got[];
    bit ref_dec[];
    int r_it, r_par, idx, mi, al;
    bit r_ok;
    longint t_acc, t_done, t_exp;
    send_sof(sof_db, idx);
    llr = new[NB];
    got = new[NB];
    for (int n = 0; n < NB; n++) llr[n] = sat31(int'((-1.0 + sigma * gauss()) * 8.0));
    mi = REF_MIN_ITER[idx];
    al = ref_alpha(idx);
    ref_decode(P, MAX_ITER, llr, mi, al, ref_dec, r_it, r_par, r_ok);

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
      int mism;
      mism = 0;
      for (int n = 0; n < NB; n++) if (got[n] != ref_dec[n]) mism++;
      check(mism == 0, $sformatf("%0d decision mismatches", mism));
    end
    check(int'(iters) == r_it, $sformatf("iters %0d, expected %0d", iters, r_it));
    check(int'(par_runs) == r_par, $sformatf("par_runs %0d, expected %0d", par_runs, r_par));
    check(success == r_ok, $sformatf("success %0d, expected %0d", success, r_ok));
    check(int'(min_iter) == mi && int'(alpha) == al, "table outputs");
    t_exp = longint'((6*P + 9) * (2*r_it + r_par) + 2*P + 1);
    check(t_done - t_acc == t_exp, $sformatf("cycles %0d, expected %0d", t_done - t_acc, t_exp));
    if (r_par < r_it) n_skip++;
    if (r_par > 1 || !r_ok) n_parfail++;
    if (r_ok) n_success++;
    if (r_it == MAX_ITER) n_maxit++;
    alpha_seen[al]++;
    $display("frame: SOF %0.1f dB -> idx %0d (min %0d, alpha %0d/16), sigma %0.2f: iters=%0d parity_runs=%0d success=%0d cycles=%0d",
             sof_db, idx, mi, al, sigma, iters, par_runs, success, t_done - t_acc);
    @(posedge clk);
  endtask

  initial begin
    int distinct;
    llr_valid = 1'b0; sof_start = 1'b0; sym_valid = 1'b0; sym = '0;
    for (int k = 0; k < LANES; k++) llr_in[k] = '0;
    for (int k = 0; k <= 16; k++) alpha_seen[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(20.0, 0.45);  // clean channel: one iteration
    run_frame(20.0, 0.72);  // parity checked every iteration, fails a few times
    run_frame(3.0,  0.72);  // moderate SNR: early iterations skip the checks
    run_frame(0.0,  1.40);  // hopeless: runs to the limit, checks only at the end
    distinct = 0;
    for (int k = 0; k <= 16; k++) if (alpha_seen[k] > 0) distinct++;
    check(n_skip > 0,    "no frame skipped tentative decision and parity check");
    check(n_parfail > 0, "no parity check failed");
    check(n_success > 0, "no frame decoded");
    check(n_maxit > 0,   "no frame hit the iteration limit");
    check(distinct > 1,  "alpha never changed");
    $display("mechanisms: skipped=%0d parity_fail=%0d success=%0d max_iter=%0d alphas=%0d",
             n_skip, n_parfail, n_success, n_maxit, distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
