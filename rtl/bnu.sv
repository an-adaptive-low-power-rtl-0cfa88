// bnu: serial bit node unit for degree-3 bits.
//
// Implements the bit node step of the decoder's algorithm:
//   z_n  = F_n + sum_m L_mn            (a-posteriori value)
//   z_mn = z_n - L_mn                  (extrinsic message back to check m)
// The three check-to-bit messages of one bit arrive in consecutive cycles
// (in_valid, in_edge = 0..2); the channel LLR F_n is taken together with
// edge 0. After edge 2 the total and the three inputs are latched, and in
// the next three cycles the three new bit-to-check messages are sent in edge
// order (out_valid, out_edge), each saturated to +/-MSG_MAX. The full-width
// total z_n is presented with out_edge = 0 (tot_valid) for the tentative
// decision. A bit takes 3 cycles; latency from an edge's input to its output
// is 3 cycles. The sum needs no saturation: 4*MSG_MAX fits in SUM_W bits.
// The update rule is the published one; the serial structure and the
// widths are this design's own.
module bnu
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_edge,
  input  msg_t       in_msg,
  input  msg_t       in_llr,
  output logic       out_valid,
  output logic [1:0] out_edge,
  output msg_t       out_msg,
  output logic       tot_valid,
  output sum_t       tot
);
  sum_t acc;
  msg_t acc_l [DV];
  sum_t res_tot;
  msg_t res_l [DV];
  sum_t nx_acc;

  always_comb begin
    if (in_edge == 2'd0) nx_acc = sum_t'(in_llr) + sum_t'(in_msg);
    else                 nx_acc = acc + sum_t'(in_msg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      res_tot   <= '0;
      out_valid <= 1'b0;
      out_edge  <= '0;
      for (int e = 0; e < DV; e++) begin
        acc_l[e] <= '0;
        res_l[e] <= '0;
      end
    end else begin
      if (in_valid) begin
        acc <= nx_acc;
        acc_l[in_edge] <= in_msg;
      end
      if (in_valid && in_edge == 2'(DV-1)) begin
        res_tot <= nx_acc;
        for (int e = 0; e < DV-1; e++) res_l[e] <= acc_l[e];
        res_l[DV-1] <= in_msg;
        out_valid <= 1'b1;
        out_edge  <= 2'd0;
      end else if (out_valid) begin
        if (out_edge == 2'(DV-1)) out_valid <= 1'b0;
        else                      out_edge  <= out_edge + 2'd1;
      end
    end
  end

  assign out_msg   = sat_msg(res_tot - sum_t'(res_l[out_edge]));
  assign tot_valid = out_valid && out_edge == 2'd0;
  assign tot       = res_tot;

  a_edge_range: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_edge < 2'(DV));
endmodule
