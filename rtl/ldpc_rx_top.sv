// ldpc_rx_top: receiver back end of the adaptive low-power LDPC scheme.
//
// The SNV estimator measures the SNR on each frame's 26-symbol start-of-
// frame header; its grid index is handed to the LDPC decoder, which uses it
// to look up (a) the first iteration in which the tentative decision and
// the parity check are worth doing and (b) its min-sum scaling factor. The
// estimator is the one an adaptive coding and modulation receiver already
// has, so the adaptive schedule costs only the table and a comparator.
//
// Ports: the SOF samples enter on sof_start/sym_valid/sym; the frame's
// channel LLRs (from the demodulator and deinterleaver, which are outside
// this design) enter on llr_valid/llr_ready/llr_in as 2P words of 8 LLRs.
// The decoder samples the most recent estimate when the last LLR word is
// taken, so the SOF must have been estimated by then (snr_idx is 0,
// i.e. -1 dB, before the first estimate). Decisions leave on out_valid /
// out_addr / out_bits, followed by the done pulse and frame status.
module ldpc_rx_top
  import ldpc_pkg::*;
#(
  parameter int P      = 576,
  parameter int MAX_IT = MAX_ITER,
  parameter int SYM_W  = 8,
  parameter int BAW    = $clog2(2*P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // SOF samples
  input  logic                    sof_start,
  input  logic                    sym_valid,
  input  logic signed [SYM_W-1:0] sym,
  output logic                    snr_valid,
  output snr_idx_t                snr_idx,
  // channel LLRs
  input  logic                    llr_valid,
  output logic                    llr_ready,
  input  msg_t                    llr_in   [LANES],
  // decisions and status
  output logic                    out_valid,
  output logic [BAW-1:0]          out_addr,
  output logic                    out_bits [LANES],
  output logic                    busy,
  output logic                    done,
  output logic                    success,
  output iter_t                   iters,
  output iter_t                   par_runs,
  output iter_t                   min_iter,
  output alpha_t                  alpha
);
  snr_estimator #(.SYM_W(SYM_W)) u_snr (
    .clk, .rst_n, .sof_start, .sym_valid, .sym,
    .est_valid(snr_valid), .snr_idx
  );

  ldpc_decoder #(.P(P), .MAX_IT(MAX_IT)) u_dec (
    .clk, .rst_n, .snr_idx,
    .llr_valid, .llr_ready, .llr_in,
    .out_valid, .out_addr, .out_bits,
    .busy, .done, .success, .iters, .par_runs, .min_iter, .alpha
  );
endmodule
