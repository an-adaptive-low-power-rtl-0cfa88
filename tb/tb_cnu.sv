// tb_cnu: random checks of the serial min-sum check node unit. Back-to-back
// checks of six random messages are fed; every output message is compared
// with a direct computation (sign product and minimum over the other five
// inputs, scaled by alpha/16), and the 6-cycle input-to-output latency of
// each slot is checked.
module tb_cnu;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid; logic [2:0] in_slot; msg_t in_msg; alpha_t alpha;
  logic out_valid; logic [2:0] out_slot; msg_t out_msg;
  cnu dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCHK = 300;
  int msgs [NCHK][6];
  int alph [NCHK];
  int exp_q[$];
  int exp_t[$];
  int cyc = 0;

  function automatic int expect_l(int c, int s);
    int mn = 1000, neg = 0;
    for (int t = 0; t < 6; t++) if (t != s) begin
      int a = msgs[c][t] < 0 ? -msgs[c][t] : msgs[c][t];
      if (a < mn) mn = a;
      if (msgs[c][t] < 0) neg ^= 1;
    end
    mn = (mn * alph[c]) >> 4;
    return neg ? -mn : mn;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int e, t;
        e = exp_q.pop_front();
        t = exp_t.pop_front();
        if (int'(out_msg) != e || cyc != t) begin
          failures++;
          $display("FAIL out %0d exp %0d at %0d exp %0d", out_msg, e, cyc, t);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_slot = 0; in_msg = 0; alpha = 0;
    for (int c = 0; c < NCHK; c++) begin
      alph[c] = (c % 3 == 0) ? 16 : $urandom_range(8, 16);
      for (int s = 0; s < 6; s++) msgs[c][s] = $urandom_range(0, 62) - 31;
      if (c == 1) for (int s = 0; s < 6; s++) msgs[c][s] = 5;     // ties
      if (c == 2) for (int s = 0; s < 6; s++) msgs[c][s] = 0;     // zeros
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < NCHK; c++) begin
      if (c == 150) begin   // a gap between checks
        in_valid <= 0;
        repeat (9) @(posedge clk);
      end
      for (int s = 0; s < 6; s++) begin
        in_valid <= 1; in_slot <= 3'(s); in_msg <= msg_t'(msgs[c][s]);
        alpha <= alpha_t'(alph[c]);
        exp_q.push_back(expect_l(c, s));
        exp_t.push_back(cyc + 7);  // counted from the cycle before the capturing edge
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
