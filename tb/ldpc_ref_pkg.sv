// ldpc_ref_pkg: bit-true reference model of the adaptive min-sum decoder,
// written flat (one array per quantity, no banks, no pipelines) for the
// testbenches to compare against.
//
// The code: check c = r*P + i (row block r = 0..7, i = 0..P-1) has six
// bits, slot s = 0..5:
//   n = ((r+s) mod 8)*2P + (s mod 2)*P + (i + r*(s+5)) mod P.
// Arithmetic: messages saturate to +/-31, check node magnitude
// = (min over the other five |Z|) * alpha16 >> 4, zero counts as positive,
// bit node total = F + sum of three L, decision 1 when total > 0.
// Tentative decision and parity check run in iteration k when
// k >= min_it or k == max_it.
package ldpc_ref_pkg;

  // Minimum iteration count per SNR grid point (-1 dB .. 12 dB, 0.5 dB step).
  localparam int REF_MIN_ITER [27] = '{50, 50, 50, 50, 42, 10, 6, 4, 4, 4, 3, 2, 2, 2, 2,
                                       1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1};

  function automatic int ref_alpha(int idx);
    if (idx < 6)       return 12;
    else if (idx < 11) return 13;
    else               return 14;
  endfunction

  function automatic int bit_of(int p, int r, int i, int s);
    return ((r + s) % 8) * 2 * p + (s % 2) * p + (i + r * (s + 5)) % p;
  endfunction

  function automatic int sat31(int v);
    if (v > 31)  return 31;
    if (v < -31) return -31;
    return v;
  endfunction

  // Decode one frame. llr[n], n = 0..16P-1. Returns the decisions in dec and
  // the number of iterations, parity phases and success flag.
  function automatic void ref_decode(input int p, input int max_it, input int llr[],
                                     input int min_it, input int alpha16,
                                     output bit dec[], output int iters,
                                     output int par_runs, output bit success);
    int nb = 16 * p;
    int nc = 8 * p;
    int z[];       // bit-to-check message per edge, edge = c*6 + s
    int l[];       // check-to-bit message per edge
    int bn[];      // bit of each edge
    int tot[];
    z = new[nc * 6]; l = new[nc * 6]; bn = new[nc * 6]; tot = new[nb];
    dec = new[nb];
    for (int n = 0; n < nb; n++) dec[n] = 1'b0;
    for (int c = 0; c < nc; c++)
      for (int s = 0; s < 6; s++) begin
        bn[c*6+s] = bit_of(p, c / p, c % p, s);
        z[c*6+s]  = llr[bn[c*6+s]];
      end
    iters = 0; par_runs = 0; success = 1'b0;
    for (int k = 1; k <= max_it; k++) begin
      iters = k;
      // check nodes
      for (int c = 0; c < nc; c++)
        for (int s = 0; s < 6; s++) begin
          int mn = 1000;
          int neg = 0;
          for (int t = 0; t < 6; t++) if (t != s) begin
            int v = z[c*6+t];
            int a = (v < 0) ? -v : v;
            if (a < mn) mn = a;
            if (v < 0) neg ^= 1;
          end
          mn = (mn * alpha16) >> 4;
          l[c*6+s] = neg ? -mn : mn;
        end
      // bit nodes
      for (int n = 0; n < nb; n++) tot[n] = llr[n];
      for (int e = 0; e < nc * 6; e++) tot[bn[e]] += l[e];
      for (int e = 0; e < nc * 6; e++) z[e] = sat31(tot[bn[e]] - l[e]);
      // tentative decision and parity check
      if (k >= min_it || k == max_it) begin
        bit ok = 1'b1;
        for (int n = 0; n < nb; n++) dec[n] = (tot[n] > 0);
        par_runs++;
        for (int c = 0; c < nc; c++) begin
          bit x = 1'b0;
          for (int s = 0; s < 6; s++) x ^= dec[bn[c*6+s]];
          if (x) ok = 1'b0;
        end
        if (ok) begin
          success = 1'b1;
          return;
        end
      end
    end
  endfunction

  // Approximately Gaussian sample, zero mean, unit variance (sum of 12 uniforms).
  function automatic real gauss();
    real acc = 0.0;
    for (int j = 0; j < 12; j++) acc += real'($urandom_range(0, 65535)) / 65536.0;
    return acc - 6.0;
  endfunction

endpackage
