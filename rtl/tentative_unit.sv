// tentative_unit: tentative hard decision and its store into the decision
// memory.
//
// For each of the LANES bit node units, the a-posteriori value z_n arrives
// once per bit (tot_valid, in local bit order 0..2P-1 of that lane). The
// decision is c_n = 1 if z_n > 0 and c_n = 0 otherwise, and it is written to
// the lane's bank of the decision memory at the lane's running bit address.
// The address counters restart on `start` (one cycle before the first bit
// of a bit-node phase). When `enable` is low (iterations before the SNR
// table's minimum) the unit neither computes nor writes anything: the
// memory write enables stay low and the old decisions stay in place, which
// is where the power saving of the adaptive schedule comes from. The write
// is issued in the same cycle as tot_valid.
// The decision rule and the gating follow the published scheme; a zero
// total deciding 0 and the addressing are this design's choices.
module tentative_unit
  import ldpc_pkg::*;
#(
  parameter int P  = 576,
  parameter int AW = $clog2(2*P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          enable,
  input  logic          tot_valid [LANES],
  input  sum_t          tot       [LANES],
  output logic          dm_we     [LANES],
  output logic [AW-1:0] dm_waddr  [LANES],
  output logic          dm_wdata  [LANES]
);
  logic [AW-1:0] addr [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) addr[l] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        if (start)             addr[l] <= '0;
        else if (tot_valid[l]) addr[l] <= addr[l] + AW'(1);
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      dm_we[l]    = enable && tot_valid[l];
      dm_waddr[l] = addr[l];
      dm_wdata[l] = enable && (tot[l] > sum_t'(0));
    end
  end
endmodule
