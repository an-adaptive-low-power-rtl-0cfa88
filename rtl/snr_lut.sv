// snr_lut: the SNR look-up tables and the iteration comparator of the
// adaptive decoder.
//
// The SNR grid index from the estimator (k = 0..26 for -1 dB .. 12 dB in
// 0.5 dB steps) is registered when load is high. From it two tables are
// read: the minimum number of iterations any frame needs at that SNR
// (Table-1 style "Min" column, see ldpc_pkg::min_iter_of) and the min-sum
// scaling factor alpha (ldpc_pkg::alpha_of). The comparator then enables the
// tentative decision and the parity check in iteration `iter` (counted from
// 1) when iter >= min_iter, or when iter is the last allowed iteration, so a
// frame that runs to the limit still ends with a decision. Indices above 26
// are treated as 26. check_en and alpha are combinational from the
// registered index and the iter input. The minimum-iteration values and
// the use of a table for both quantities are published; the alpha values
// and the >= comparison with the forced last-iteration check are this
// design's choices.
module snr_lut
  import ldpc_pkg::*;
#(
  parameter int MAX_IT = MAX_ITER
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  snr_idx_t snr_idx,
  input  iter_t    iter,
  output iter_t    min_iter,
  output alpha_t   alpha,
  output logic     check_en
);
  snr_idx_t idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    idx_q <= '0;
    else if (load) idx_q <= (snr_idx > snr_idx_t'(SNR_STEPS-1)) ? snr_idx_t'(SNR_STEPS-1) : snr_idx;
  end

  assign min_iter = min_iter_of(idx_q);
  assign alpha    = alpha_of(idx_q);
  assign check_en = (iter >= min_iter) || (iter >= iter_t'(MAX_IT));
endmodule
