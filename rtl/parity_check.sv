// parity_check: syndrome check H * c^T = 0 over the tentative decisions.
//
// One lane per check node unit. In the parity phase the decision bits of a
// check arrive one per cycle per lane, slots 0..5 in consecutive cycles
// (in_valid, in_slot), in the same order the check node units see their
// messages, through the same crossbar. Each lane XORs the six bits; after
// slot 5, a result of 1 is an unsatisfied check. `clear` (at the start of a
// parity phase) resets the failure flag and the counters. `fail` is sticky
// for the phase: the frame decodes successfully when a complete phase ends
// with fail low. `checks` counts checks completed in the phase and
// `unsat` counts unsatisfied ones; both are registered.
// The check itself is the published one; lanes, counters and the
// sticky flag are this design's.
module parity_check
  import ldpc_pkg::*;
#(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [2:0]       in_slot,
  input  logic             in_bit [LANES],
  output logic             fail,
  output logic [CNT_W-1:0] checks,
  output logic [CNT_W-1:0] unsat
);
  logic par [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail   <= 1'b0;
      checks <= '0;
      unsat  <= '0;
      for (int l = 0; l < LANES; l++) par[l] <= 1'b0;
    end else if (clear) begin
      fail   <= 1'b0;
      checks <= '0;
      unsat  <= '0;
      for (int l = 0; l < LANES; l++) par[l] <= 1'b0;
    end else if (in_valid) begin
      logic [CNT_W-1:0] n_bad;
      n_bad = '0;
      for (int l = 0; l < LANES; l++) begin
        logic p;
        p = (in_slot == 3'd0) ? in_bit[l] : (par[l] ^ in_bit[l]);
        par[l] <= p;
        if (in_slot == 3'd5 && p) n_bad = n_bad + CNT_W'(1);
      end
      if (in_slot == 3'd5) begin
        checks <= checks + CNT_W'(LANES);
        unsat  <= unsat + n_bad;
        if (n_bad != '0) fail <= 1'b1;
      end
    end
  end
endmodule
