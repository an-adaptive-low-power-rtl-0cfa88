// snr_estimator: data-aided signal-to-noise-variance (SNV) SNR estimator
// over the start-of-frame (SOF) header.
//
// With N = 26 received SOF samples r_m and the known pilots c_m = +/-1,
//   A = sum r_m c_m,  B = sum r_m^2,
// the SNV estimate (1/N A)^2 / (1/N B - (1/N A)^2) equals A^2 / (N B - A^2).
// Rather than taking a logarithm, the estimate is placed on the 0.5 dB grid
// of the SNR tables by comparing A^2 * 4096 against T_k * (N B - A^2), with
// T_k the linear SNR of grid point k in Q4.12 (ldpc_pkg::snr_threshold).
// The index is the number of grid points lying strictly below the estimate,
// capped at 26, i.e. the estimate rounded up to the grid (an estimate
// between 2.0 and 2.5 dB gives the 2.5 dB entry); below -1 dB gives 0.
//
// Interface: sym_valid qualifies sym (real, derotated BPSK sample, two's
// complement); sof_start marks the first SOF sample. Samples without an
// open SOF window are ignored. After the 26th sample the unit spends
// SNR_STEPS + 1 = 28 cycles on the serial comparison (one multiplier), then
// pulses est_valid with snr_idx, which holds until the next estimate.
// The SNV formula and the 26-symbol header are published; the threshold
// comparison instead of a logarithm, the rounding, the sample width and
// the serial structure are this design's own.
module snr_estimator
  import ldpc_pkg::*;
#(
  parameter int SYM_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sof_start,
  input  logic                    sym_valid,
  input  logic signed [SYM_W-1:0] sym,
  output logic                    est_valid,
  output snr_idx_t                snr_idx
);
  localparam int AW = SYM_W + 6;          // |A| <= 26 * 2^(SYM_W-1)
  localparam int BW = 2*SYM_W + 5;        // B  <= 26 * 2^(2*SYM_W-2)
  localparam int PW = 2*AW + 2;           // A^2 and N*B
  localparam int CW = PW + THR_W + 13;    // comparison width

  typedef enum logic [1:0] {E_IDLE, E_ACC, E_CMP} est_state_e;

  est_state_e               state;
  logic [4:0]               m;            // sample index within the SOF
  logic signed [AW-1:0]     acc_a;
  logic        [BW-1:0]     acc_b;
  logic        [PW-1:0]     num, den;
  logic [4:0]               k;
  logic [4:0]               above;

  logic                     pilot_neg;
  logic signed [AW-1:0]     corr;
  logic        [BW-1:0]     sq;
  logic signed [AW-1:0]     a_nx;
  logic        [BW-1:0]     b_nx;
  logic        [PW-1:0]     a_sq, nb;
  logic                     gt;

  always_comb begin
    logic [4:0] mi;
    mi        = sof_start ? 5'd0 : m;
    pilot_neg = SOF_BITS[SOF_LEN - 1 - int'(mi)];
    corr      = pilot_neg ? -AW'(sym) : AW'(sym);
    sq        = BW'(sym * sym);
    a_nx      = sof_start ? corr : acc_a + corr;
    b_nx      = sof_start ? sq   : acc_b + sq;
    a_sq      = PW'(a_nx * a_nx);
    nb        = PW'(b_nx) * PW'(SOF_LEN);
    gt        = (CW'(num) << 12) > (CW'(snr_threshold(int'(k))) * CW'(den));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      m         <= '0;
      acc_a     <= '0;
      acc_b     <= '0;
      num       <= '0;
      den       <= '0;
      k         <= '0;
      above     <= '0;
      est_valid <= 1'b0;
      snr_idx   <= '0;
    end else begin
      est_valid <= 1'b0;
      if (sym_valid && (sof_start || state == E_ACC)) begin
        acc_a <= a_nx;
        acc_b <= b_nx;
        if (!sof_start && m == 5'(SOF_LEN - 1)) begin
          state <= E_CMP;
          num   <= a_sq;
          den   <= nb - a_sq;      // >= 0 by Cauchy-Schwarz
          k     <= '0;
          above <= '0;
        end else begin
          state <= E_ACC;
          m     <= sof_start ? 5'd1 : m + 5'd1;
        end
      end else if (state == E_CMP) begin
        if (k == 5'(SNR_STEPS)) begin
          state     <= E_IDLE;
          est_valid <= 1'b1;
          snr_idx   <= (above > 5'(SNR_STEPS - 1)) ? 5'(SNR_STEPS - 1) : above;
        end else begin
          above <= above + 5'(gt);
          k     <= k + 5'd1;
        end
      end
    end
  end
endmodule
