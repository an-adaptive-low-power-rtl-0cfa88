// tb_bnu: random checks of the serial bit node unit. Back-to-back bits with
// a random channel LLR and three random check messages are fed; the three
// outputs (saturated total minus own input), the total and their 3-cycle
// latency are compared with a direct computation.
module tb_bnu;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid; logic [1:0] in_edge; msg_t in_msg, in_llr;
  logic out_valid; logic [1:0] out_edge; msg_t out_msg; logic tot_valid; sum_t tot;
  bnu dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$], exp_t[$], tot_q[$];
  int cyc = 0;

  function automatic int sat(int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int e, t;
      checks++;
      e = exp_q.pop_front();
      t = exp_t.pop_front();
      if (int'(out_msg) != e || cyc != t) begin
        failures++;
        $display("FAIL out %0d exp %0d at %0d exp %0d", out_msg, e, cyc, t);
      end
      if (tot_valid) begin
        checks++;
        if (int'(tot) != tot_q.pop_front()) begin failures++; $display("FAIL total"); end
      end
    end
  end

  initial begin
    in_valid = 0; in_edge = 0; in_msg = 0; in_llr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int b = 0; b < 400; b++) begin
      int f, l[3], t;
      f = $urandom_range(0, 62) - 31;
      for (int e = 0; e < 3; e++) l[e] = $urandom_range(0, 62) - 31;
      if (b == 0) begin f = 31; l = '{31, 31, 31}; end      // positive saturation
      if (b == 1) begin f = -31; l = '{-31, -31, -31}; end  // negative saturation
      t = f + l[0] + l[1] + l[2];
      tot_q.push_back(t);
      if (b == 200) begin in_valid <= 0; repeat (5) @(posedge clk); end
      for (int e = 0; e < 3; e++) begin
        in_valid <= 1; in_edge <= 2'(e); in_msg <= msg_t'(l[e]);
        in_llr <= (e == 0) ? msg_t'(f) : msg_t'($urandom_range(0, 62) - 31);
        exp_q.push_back(sat(t - l[e]));
        exp_t.push_back(cyc + 4);  // counted from the cycle before the capturing edge
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
