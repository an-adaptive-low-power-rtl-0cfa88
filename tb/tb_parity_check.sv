// tb_parity_check: random decision bits through sweeps of 6-slot checks on
// all lanes; counts unsatisfied checks independently and checks fail,
// checks and unsat after each sweep, including an all-satisfied sweep and
// the clear.
module tb_parity_check;
  import ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, in_valid; logic [2:0] in_slot; logic in_bit [LANES];
  logic fail; logic [15:0] checks_o, unsat;
  parity_check dut (.clk, .rst_n, .clear, .in_valid, .in_slot, .in_bit, .fail, .checks(checks_o), .unsat);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    clear = 0; in_valid = 0; in_slot = 0;
    for (int l = 0; l < LANES; l++) in_bit[l] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int sweep = 0; sweep < 6; sweep++) begin
      int bad;
      bad = 0;
      clear <= 1; @(posedge clk); clear <= 0;
      for (int c = 0; c < 40; c++) begin
        bit par [LANES];
        for (int l = 0; l < LANES; l++) par[l] = 0;
        for (int s = 0; s < 6; s++) begin
          in_valid <= 1; in_slot <= 3'(s);
          for (int l = 0; l < LANES; l++) begin
            bit b;
            b = (sweep == 1) ? 1'b0 : (sweep == 3 && s < 2) ? 1'b1 : (sweep == 3) ? 1'b0 : 1'($urandom);
            if (sweep == 5 && !(c == 17 && l == 3 && s == 0)) b = 1'b0;  // a single bad check
            in_bit[l] <= b;
            par[l] ^= b;
          end
          @(posedge clk);
        end
        for (int l = 0; l < LANES; l++) if (par[l]) bad++;
        if (c == 9) begin in_valid <= 0; repeat (3) @(posedge clk); end
      end
      in_valid <= 0;
      @(posedge clk); #1;
      checks += 3;
      if (fail !== (bad != 0)) begin failures++; $display("FAIL fail flag sweep %0d", sweep); end
      if (int'(checks_o) != 40*LANES) begin failures++; $display("FAIL check count"); end
      if (int'(unsat) != bad) begin failures++; $display("FAIL unsat %0d exp %0d", unsat, bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
