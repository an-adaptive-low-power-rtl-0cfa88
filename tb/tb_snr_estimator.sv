// tb_snr_estimator: SOF headers (DVB-S2 SOF pilots, amplitude 40) with
// Gaussian noise over a range of noise levels. For each header the SNV
// estimate is recomputed in floating point from the same integer samples,
// converted to dB and rounded up to the 0.5 dB grid (-1 .. 12 dB); the
// unit's index must match except within 0.01 dB of a grid point, where the
// fixed-point thresholds may round either way. Also checks the 28-cycle
// delay from the last sample to est_valid and that samples outside a SOF
// window are ignored.
module tb_snr_estimator;
  import ldpc_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic sof_start, sym_valid, est_valid;
  logic signed [7:0] sym;
  logic [4:0] snr_idx;
  snr_estimator dut (.*);
  localparam logic [25:0] SOF = 26'h18D2E82;
  int checks = 0, failures = 0, compared = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int seen_idx [27];
    sof_start = 0; sym_valid = 0; sym = 0;
    for (int k = 0; k < 27; k++) seen_idx[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // a stray sample with no SOF open
    sym_valid <= 1; sym <= 8'sd50; @(posedge clk); sym_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (est_valid) begin failures++; $display("FAIL stray sample"); end
    for (int f = 0; f < 400; f++) begin
      real sigma, a, b, rho, db;
      int r [26];
      int exp_idx, wait_c;
      bit near;
      sigma = (f == 0) ? 0.0 : 2.0 + real'(f % 100) * 0.5;
      a = 0.0; b = 0.0;
      for (int m = 0; m < 26; m++) begin
        real y;
        int c;
        c = SOF[25 - m] ? -1 : 1;
        y = 40.0 * real'(c) + sigma * gauss();
        r[m] = int'(y);
        if (r[m] > 127) r[m] = 127;
        if (r[m] < -128) r[m] = -128;
        a += real'(r[m] * c);
        b += real'(r[m] * r[m]);
      end
      a = a / 26.0; b = b / 26.0;
      if (b - a*a <= 0.0) db = 100.0;
      else begin
        rho = a*a / (b - a*a);
        db = 10.0 * $log10(rho);
      end
      exp_idx = 0; near = 0;
      for (int k = 0; k < 27; k++) begin
        real g;
        g = -1.0 + 0.5 * real'(k);
        if (db > g) exp_idx = k + 1;
        if (db - g < 0.01 && g - db < 0.01) near = 1;
      end
      if (exp_idx > 26) exp_idx = 26;
      for (int m = 0; m < 26; m++) begin
        sof_start <= (m == 0); sym_valid <= 1; sym <= 8'(r[m]);
        @(posedge clk);
        if (m == 7 && f % 3 == 0) begin   // gap inside the header
          sym_valid <= 0; sof_start <= 0;
          repeat (4) @(posedge clk);
        end
      end
      sof_start <= 0; sym_valid <= 0;
      wait_c = 0;
      do begin
        @(posedge clk);
        #1;
        wait_c++;
      end while (!est_valid && wait_c < 100);
      checks++;
      if (wait_c != 28) begin failures++; $display("FAIL delay %0d", wait_c); end
      if (!near) begin
        checks++;
        compared++;
        seen_idx[exp_idx]++;
        if (int'(snr_idx) != exp_idx) begin
          failures++;
          $display("FAIL %0.3f dB: idx %0d exp %0d", db, snr_idx, exp_idx);
        end
      end
      @(posedge clk);
    end
    begin
      int distinct;
      distinct = 0;
      for (int k = 0; k < 27; k++) if (seen_idx[k] > 0) distinct++;
      checks++;
      if (distinct < 15) begin failures++; $display("FAIL only %0d grid points covered", distinct); end
      $display("compared %0d estimates over %0d grid points", compared, distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
