// tb_agu: sweeps of all three modes at P = 16. Checks the sweep length
// (6P cycles of rd_valid, rd_last on the final one), every bank's bit and
// edge address against the code construction, and that a check or parity
// sweep touches every edge of every bank exactly once.
module tb_agu;
  import ldpc_pkg::*;
  localparam int P = 16, BAW = $clog2(2*P), EAW = $clog2(6*P);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start; agu_mode_e mode; logic rd_valid, rd_last; logic [2:0] slot;
  logic [BAW-1:0] bit_addr [LANES];
  logic [EAW-1:0] edge_addr [LANES];
  agu #(.P(P)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic sweep(input agu_mode_e md);
    int seen [LANES][6*P];
    int t;
    for (int m = 0; m < LANES; m++) for (int a = 0; a < 6*P; a++) seen[m][a] = 0;
    start <= 1; mode <= md;
    @(posedge clk);
    start <= 0;
    t = 0;
    #1;
    while (rd_valid) begin
      for (int m = 0; m < LANES; m++) begin
        int eb, ee, s, i;
        if (md == AGU_BIT) begin
          s = t % 3; eb = t / 3; ee = 3*eb + s;
        end else begin
          int r;
          s = t % 6; i = t / 6; r = (m - s + 8) % 8;
          eb = (s % 2) * P + (i + r * (s + 5)) % P;
          ee = 3*eb + s / 2;
        end
        checks++;
        if (int'(bit_addr[m]) != eb || int'(edge_addr[m]) != ee || int'(slot) != s) begin
          failures++;
          $display("FAIL mode %0d t %0d bank %0d: %0d/%0d exp %0d/%0d", md, t, m, bit_addr[m], edge_addr[m], eb, ee);
        end
        seen[m][int'(edge_addr[m])]++;
      end
      checks++;
      if (rd_last !== (t == 6*P - 1)) begin failures++; $display("FAIL rd_last at %0d", t); end
      t++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (t != 6*P) begin failures++; $display("FAIL sweep length %0d", t); end
    for (int m = 0; m < LANES; m++) for (int a = 0; a < 6*P; a++) begin
      checks++;
      if (seen[m][a] != 1) begin failures++; $display("FAIL bank %0d edge %0d seen %0d", m, a, seen[m][a]); end
    end
    repeat (3) @(posedge clk);
  endtask
  initial begin
    start = 0; mode = AGU_CHECK;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    sweep(AGU_CHECK);
    sweep(AGU_BIT);
    sweep(AGU_PARITY);
    sweep(AGU_CHECK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
