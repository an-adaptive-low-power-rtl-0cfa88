// ldpc_ctrl: frame and iteration controller of the adaptive decoder.
//
// A frame goes through LOAD, then iterations, then UNLOAD:
//   LOAD    2P words of LANES channel LLRs are accepted (in_valid/in_ready);
//           word b holds local bit b of every lane. After the last word the
//           SNR tables are loaded (lut_load) and iteration 1 begins.
//   CHECK   check node phase (the first iteration reads the channel LLRs
//           instead of the edge memories: first_iter).
//   BIT     bit node phase; the tentative decision is written only when the
//           SNR comparator's check_en is high for this iteration.
//   PARITY  parity-check phase, entered only when check_en is high. A phase
//           without an unsatisfied check ends decoding with success;
//           otherwise the next iteration starts, up to MAX_IT iterations.
//   UNLOAD  the decision memory is streamed out, 2P words of LANES bits.
// Iterations whose index is below the SNR table's minimum go straight from
// BIT to the next CHECK: tentative decision and parity check are skipped.
// Every CHECK, BIT and PARITY phase lasts exactly PHASE_LEN = 6P + DRAIN + 1
// cycles: the address sweep starts in the phase's first cycle (agu_start),
// reads run for 6P cycles, and DRAIN cycles let the write-back pipelines
// empty. UNLOAD lasts 2P + 1 cycles; done pulses in its last cycle, with
// success, iters (iterations run) and par_runs (parity phases run) valid
// from then until the next frame's load ends.
// The phase order and the skipping of tentative decision and parity check
// before the SNR table's minimum follow the published scheme; the cycle
// timing, the load/unload protocol and the drain length are this design's.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int P      = 576,
  parameter int MAX_IT = MAX_ITER,
  parameter int BAW    = $clog2(2*P)
) (
  input  logic           clk,
  input  logic           rst_n,
  // channel LLR load
  input  logic           in_valid,
  output logic           in_ready,
  output logic           llr_we,
  output logic [BAW-1:0] llr_waddr,
  // SNR tables
  output logic           lut_load,
  input  logic           check_en,
  output iter_t          iter,
  // datapath sequencing
  output agu_mode_e      agu_mode,
  output logic           agu_start,
  output logic           first_iter,
  output logic           phase_check,
  output logic           phase_bit,
  output logic           phase_parity,
  output logic           tent_start,
  output logic           tent_en,
  output logic           pc_clear,
  input  logic           pc_fail,
  // decision read-out
  output logic           dm_re_out,
  output logic [BAW-1:0] dm_raddr_out,
  output logic           out_valid,
  output logic [BAW-1:0] out_addr,
  // status
  output logic           busy,
  output logic           done,
  output logic           success,
  output iter_t          iters,
  output iter_t          par_runs
);
  localparam int DRAIN     = 8;
  localparam int PHASE_LEN = 6*P + DRAIN + 1;
  localparam int CW        = $clog2(PHASE_LEN + 1);

  dec_state_e    state;
  logic [CW-1:0] cnt;
  logic          phase_end;
  logic          unload_rd;

  assign phase_end = (cnt == CW'(PHASE_LEN - 1));
  assign unload_rd = (state == ST_UNLOAD) && (cnt < CW'(2*P));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      iter      <= '0;
      success   <= 1'b0;
      iters     <= '0;
      par_runs  <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
    end else begin
      out_valid <= unload_rd;
      out_addr  <= BAW'(cnt);
      unique case (state)
        ST_IDLE, ST_LOAD: begin
          if (in_valid) begin
            state <= ST_LOAD;
            if (cnt == CW'(2*P - 1)) begin
              state    <= ST_CHECK;
              cnt      <= '0;
              iter     <= iter_t'(1);
              success  <= 1'b0;
              par_runs <= '0;
            end else begin
              cnt <= cnt + CW'(1);
            end
          end
        end
        ST_CHECK: begin
          cnt <= phase_end ? '0 : cnt + CW'(1);
          if (phase_end) state <= ST_BIT;
        end
        ST_BIT: begin
          cnt <= phase_end ? '0 : cnt + CW'(1);
          if (phase_end) begin
            if (check_en) begin
              state <= ST_PARITY;
            end else begin
              state <= ST_CHECK;
              iter  <= iter + iter_t'(1);
            end
          end
        end
        ST_PARITY: begin
          cnt <= phase_end ? '0 : cnt + CW'(1);
          if (phase_end) begin
            par_runs <= par_runs + iter_t'(1);
            if (!pc_fail || iter >= iter_t'(MAX_IT)) begin
              state   <= ST_UNLOAD;
              success <= !pc_fail;
              iters   <= iter;
            end else begin
              state <= ST_CHECK;
              iter  <= iter + iter_t'(1);
            end
          end
        end
        ST_UNLOAD: begin
          if (cnt == CW'(2*P)) begin
            state <= ST_IDLE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + CW'(1);
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign in_ready     = (state == ST_IDLE) || (state == ST_LOAD);
  assign llr_we       = in_ready && in_valid;
  assign llr_waddr    = BAW'(cnt);
  assign lut_load     = llr_we && (cnt == CW'(2*P - 1));

  assign phase_check  = (state == ST_CHECK);
  assign phase_bit    = (state == ST_BIT);
  assign phase_parity = (state == ST_PARITY);
  assign agu_start    = (phase_check || phase_bit || phase_parity) && (cnt == '0);
  assign agu_mode     = phase_check ? AGU_CHECK : (phase_bit ? AGU_BIT : AGU_PARITY);
  assign first_iter   = (iter == iter_t'(1));
  assign tent_start   = phase_bit && (cnt == '0);
  assign tent_en      = phase_bit && check_en;
  assign pc_clear     = phase_parity && (cnt == '0);

  assign dm_re_out    = unload_rd;
  assign dm_raddr_out = BAW'(cnt);

  assign busy         = (state != ST_IDLE);
  assign done         = (state == ST_UNLOAD) && (cnt == CW'(2*P));

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_ready);
endmodule
