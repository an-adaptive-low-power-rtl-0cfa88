// agu: address generation unit of the partially parallel decoder.
//
// One `start` pulse launches a sweep of 6*P read cycles in the selected mode
// (sampled with start). In every cycle of the sweep `rd_valid` is high and
// one address per bank is presented, combinationally from the sweep
// counters:
//   AGU_CHECK / AGU_PARITY: check i = 0..P-1 of every row block, slots
//     s = 0..5 in consecutive cycles. Bank m is read by check node unit
//     r = (m - s) mod 8 and serves bit (s mod 2)*P + (i + shift(r,s)) mod P
//     of its 2P bits; the edge address is 3*bit + s/2. `slot` = s is also
//     the crossbar rotation.
//   AGU_BIT: local bit b = 0..2P-1 of every bank, edges e = 0..2 in
//     consecutive cycles, edge address 3*b + e, bit address b; `slot` = e.
// `rd_last` marks the final cycle of the sweep. The same sweep serves the
// check node phase (edge memories, or the channel LLR banks in the first
// iteration), the bit node phase and the parity check (decision banks).
// That the AGU exists and feeds both the check nodes and the parity check
// follows the published architecture; the address patterns follow this
// design's own code construction (ldpc_pkg).
module agu
  import ldpc_pkg::*;
#(
  parameter int P   = 576,
  parameter int BAW = $clog2(2*P),
  parameter int EAW = $clog2(DV*2*P)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  agu_mode_e      mode,
  output logic           rd_valid,
  output logic           rd_last,
  output logic [2:0]     slot,
  output logic [BAW-1:0] bit_addr  [LANES],
  output logic [EAW-1:0] edge_addr [LANES]
);
  localparam int CW = $clog2(2*P);

  agu_mode_e     mode_q;
  logic          busy;
  logic [CW-1:0] cnt;    // check index i, or local bit b in AGU_BIT
  logic [2:0]    sub;    // slot s, or edge e in AGU_BIT
  logic          last;

  assign last = (mode_q == AGU_BIT) ? (sub == 3'(DV-1) && cnt == CW'(2*P-1))
                                    : (sub == 3'(DC-1) && cnt == CW'(P-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= AGU_CHECK;
      busy   <= 1'b0;
      cnt    <= '0;
      sub    <= '0;
    end else if (start) begin
      mode_q <= mode;
      busy   <= 1'b1;
      cnt    <= '0;
      sub    <= '0;
    end else if (busy) begin
      if (last) begin
        busy <= 1'b0;
        cnt  <= '0;
        sub  <= '0;
      end else if ((mode_q == AGU_BIT && sub == 3'(DV-1)) || (mode_q != AGU_BIT && sub == 3'(DC-1))) begin
        sub <= '0;
        cnt <= cnt + CW'(1);
      end else begin
        sub <= sub + 3'd1;
      end
    end
  end

  assign rd_valid = busy;
  assign rd_last  = busy && last;
  assign slot     = sub;

  for (genvar m = 0; m < LANES; m++) begin : g_lane
    // circulant shifts met by bank m in slots 0..5 (row block (m - s) mod 8)
    localparam int SH [DC] = '{shift_of((m + LANES - 0) % LANES, 0, P),
                               shift_of((m + LANES - 1) % LANES, 1, P),
                               shift_of((m + LANES - 2) % LANES, 2, P),
                               shift_of((m + LANES - 3) % LANES, 3, P),
                               shift_of((m + LANES - 4) % LANES, 4, P),
                               shift_of((m + LANES - 5) % LANES, 5, P)};
    int sh, b;
    always_comb begin
      sh = (sub < 3'(DC)) ? SH[sub] : 0;
      if (mode_q == AGU_BIT) begin
        b = int'(cnt);
        edge_addr[m] = EAW'(DV*b + int'(sub));
      end else begin
        b = int'(cnt) + sh;
        if (b >= P) b = b - P;
        if (sub[0]) b = b + P;
        edge_addr[m] = EAW'(DV*b + (int'(sub) >> 1));
      end
      bit_addr[m] = BAW'(b);
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
