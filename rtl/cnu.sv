// cnu: serial check node unit for degree-6 checks, normalised min-sum.
//
// Implements the check node step of the decoder's algorithm:
//   L_mn = prod_{n' != n} sign(Z_mn') * min_{n' != n} |Z_mn'| * alpha.
// Bit-to-check messages Z arrive one per cycle, slots 0..5 of one check in
// consecutive cycles (in_valid high, in_slot = 0..5). The unit keeps the
// smallest and second smallest magnitude, the slot of the smallest, the
// product of signs and the six signs. When slot 5 has been taken, these are
// latched and in the next six cycles the six check-to-bit messages are sent
// in slot order (out_valid, out_slot); the next check is accumulated
// meanwhile, so a check takes 6 cycles and the latency from a slot's input
// to its output is 6 cycles. The magnitude sent to edge n is the second
// minimum if n held the minimum, otherwise the minimum, scaled by
// alpha/16 and truncated. Zero counts as positive. The alpha input is
// sampled with each check's slot 5. Inputs must lie in -MSG_MAX..MSG_MAX.
// The update rule is the published normalised min-sum; the serial
// one-message-per-cycle structure, widths and truncation are this design's.
module cnu
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] in_slot,
  input  msg_t       in_msg,
  input  alpha_t     alpha,
  output logic       out_valid,
  output logic [2:0] out_slot,
  output msg_t       out_msg
);
  localparam int MAG_W = MSG_W - 1;
  typedef logic [MAG_W-1:0] mag_t;

  // accumulation of the check being received
  mag_t       acc_min1, acc_min2;
  logic [2:0] acc_idx;
  logic       acc_sp;
  logic [5:0] acc_sgn;
  // latched result of the previous check
  mag_t       res_min1, res_min2;
  logic [2:0] res_idx;
  logic       res_sp;
  logic [5:0] res_sgn;
  alpha_t     res_alpha;

  logic in_sgn;
  mag_t in_mag;
  assign in_sgn = in_msg[MSG_W-1];
  assign in_mag = in_sgn ? mag_t'(-in_msg) : mag_t'(in_msg);

  // running values including the current input
  mag_t       nx_min1, nx_min2;
  logic [2:0] nx_idx;
  logic       nx_sp;
  logic [5:0] nx_sgn;

  always_comb begin
    if (in_slot == 3'd0) begin
      nx_min1 = in_mag;
      nx_min2 = mag_t'(MSG_MAX);
      nx_idx  = 3'd0;
      nx_sp   = in_sgn;
      nx_sgn  = {5'b0, in_sgn};
    end else begin
      nx_sp  = acc_sp ^ in_sgn;
      nx_sgn = acc_sgn;
      nx_sgn[in_slot] = in_sgn;
      if (in_mag < acc_min1) begin
        nx_min1 = in_mag;
        nx_min2 = acc_min1;
        nx_idx  = in_slot;
      end else begin
        nx_min1 = acc_min1;
        nx_min2 = (in_mag < acc_min2) ? in_mag : acc_min2;
        nx_idx  = acc_idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_min1 <= '0; acc_min2 <= '0; acc_idx <= '0; acc_sp <= 1'b0; acc_sgn <= '0;
      res_min1 <= '0; res_min2 <= '0; res_idx <= '0; res_sp <= 1'b0; res_sgn <= '0;
      res_alpha <= '0;
      out_valid <= 1'b0;
      out_slot  <= '0;
    end else begin
      if (in_valid) begin
        acc_min1 <= nx_min1; acc_min2 <= nx_min2; acc_idx <= nx_idx;
        acc_sp   <= nx_sp;   acc_sgn  <= nx_sgn;
      end
      if (in_valid && in_slot == 3'd5) begin
        res_min1 <= nx_min1; res_min2 <= nx_min2; res_idx <= nx_idx;
        res_sp   <= nx_sp;   res_sgn  <= nx_sgn;  res_alpha <= alpha;
        out_valid <= 1'b1;
        out_slot  <= 3'd0;
      end else if (out_valid) begin
        if (out_slot == 3'd5) out_valid <= 1'b0;
        else                  out_slot  <= out_slot + 3'd1;
      end
    end
  end

  // output message for the current output slot
  logic [MAG_W+ALPHA_W-1:0] scaled;
  mag_t                     out_mag;
  always_comb begin
    scaled  = (MAG_W+ALPHA_W)'(out_slot == res_idx ? res_min2 : res_min1) * (MAG_W+ALPHA_W)'(res_alpha);
    out_mag = mag_t'(scaled >> 4);
    out_msg = (res_sp ^ res_sgn[out_slot]) ? -msg_t'({1'b0, out_mag}) : msg_t'({1'b0, out_mag});
  end


  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_slot <= 3'd5);

endmodule
