// tb_snr_sweep: SNR sweep workload at the default size (9216-bit frames,
// limit 50 iterations), in the manner of an iterations-versus-SNR table.
//
// For each channel SNR from 1.5 to 6 dB (SNR = 1/sigma^2 for unit BPSK
// amplitude, the same definition the SOF estimator sees), a few frames are
// sent through the whole receiver: SOF header, estimate, adaptive decoding.
// Every frame is checked bit-true against the reference model run with the
// estimated table entry, and the same frame is also run through the model
// with the parity check in every iteration (the conventional schedule).
// The testbench checks that the adaptive schedule never loses a frame the
// conventional one decodes, and reports per SNR point: minimum and average
// iterations, parity phases saved and their share of the decoding cycles,
// and frames whose success came later than with the conventional schedule
// (which happens when this design's code converges faster than the table
// assumes).
module tb_snr_sweep;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int P   = 576;
  localparam int NB  = 16 * P;
  localparam int BAW = $clog2(2*P);
  localparam int FRAMES = 3;
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

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
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

  task automatic send_sof(input real sigma);
    for (int m = 0; m < 26; m++) begin
      int r;
      r = int'(40.0 * (SOF[25 - m] ? -1.0 : 1.0) + 40.0 * sigma * gauss());
      if (r > 127) r = 127;
      if (r < -128) r = -128;
      sof_start <= (m == 0); sym_valid <= 1'b1; sym <= 8'(r);
      @(posedge clk);
    end
    sof_start <= 1'b0; sym_valid <= 1'b0;
    while (!snr_valid) @(posedge clk);
    @(posedge clk);
  endtask

  // one frame; returns iterations, parity phases and success of the
  // adaptive run, and iterations and success of the conventional run
  task automatic frame(input real sigma, output int a_it, output int a_par, output bit a_ok,
                       output int c_it, output bit c_ok, output int idx);
    int llr[];
    bit got[];
    bit ref_dec[], conv_dec[];
    int mi, al, c_par;
    send_sof(sigma);
    idx = int'(snr_idx);
    llr = new[NB];
    got = new[NB];
    for (int n = 0; n < NB; n++) llr[n] = sat31(int'((-1.0 + sigma * gauss()) * 8.0));
    mi = REF_MIN_ITER[idx];
    al = ref_alpha(idx);
    ref_decode(P, MAX_ITER, llr, mi, al, ref_dec, a_it, a_par, a_ok);
    ref_decode(P, MAX_ITER, llr, 1, al, conv_dec, c_it, c_par, c_ok);
    for (int b = 0; b < 2*P; b++) begin
      llr_valid <= 1'b1;
      for (int k = 0; k < LANES; k++) llr_in[k] <= msg_t'(llr[k*2*P + b]);
      @(posedge clk);
      while (!llr_ready) @(posedge clk);
    end
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
    begin
      int mism;
      mism = 0;
      for (int n = 0; n < NB; n++) if (got[n] != ref_dec[n]) mism++;
      check(mism == 0 && int'(iters) == a_it && int'(par_runs) == a_par && success == a_ok,
            $sformatf("frame differs from the reference model (%0d bits, iters %0d/%0d)", mism, iters, a_it));
    end
    check(a_ok == c_ok, "adaptive schedule changed the decoding outcome");
    @(posedge clk);
  endtask

  initial begin
    real snrs [10] = '{1.5, 2.0, 2.5, 3.0, 3.5, 4.0, 4.5, 5.0, 5.5, 6.0};
    int tot_saved;
    llr_valid = 1'b0; sof_start = 1'b0; sym_valid = 1'b0; sym = '0;
    for (int k = 0; k < LANES; k++) llr_in[k] = '0;
    tot_saved = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    $display(" SNR | estimated SNR  | table min | iters min/avg | parity phases adaptive/conventional | cycles saved | frames later | decoded");
    foreach (snrs[j]) begin
      real sigma, avg;
      int mn, sum_it, sum_par, sum_conv, late, ok_n, idx_lo, idx_hi;
      longint cyc_a, cyc_c;
      sigma = 1.0 / $sqrt($pow(10.0, snrs[j] / 10.0));
      mn = 1000; sum_it = 0; sum_par = 0; sum_conv = 0; late = 0; ok_n = 0; cyc_a = 0; cyc_c = 0;
      idx_lo = 99; idx_hi = -1;
      for (int f = 0; f < FRAMES; f++) begin
        int a_it, a_par, c_it, idx;
        bit a_ok, c_ok;
        frame(sigma, a_it, a_par, a_ok, c_it, c_ok, idx);
        if (idx < idx_lo) idx_lo = idx;
        if (idx > idx_hi) idx_hi = idx;
        if (a_it < mn) mn = a_it;
        sum_it += a_it;
        sum_par += a_par;
        sum_conv += c_it;
        if (a_ok) ok_n++;
        if (a_it > c_it) late++;
        cyc_a += longint'(6*P + 9) * (2*a_it + a_par);
        cyc_c += longint'(6*P + 9) * (3*c_it);
      end
      tot_saved += sum_conv - sum_par;
      avg = real'(sum_it) / real'(FRAMES);
      $display("%4.1f | %5.1f..%4.1f dB | %2d..%2d | %3d / %5.2f | %4d / %4d | %5.1f %% | %0d | %0d/%0d",
               snrs[j], -1.0 + 0.5 * real'(idx_lo), -1.0 + 0.5 * real'(idx_hi),
               REF_MIN_ITER[idx_hi], REF_MIN_ITER[idx_lo], mn, avg, sum_par, sum_conv,
               100.0 * real'(cyc_c - cyc_a) / real'(cyc_c), late, ok_n, FRAMES);
    end
    check(tot_saved > 0, "the sweep never skipped a parity phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
