// tb_tentative_unit: random a-posteriori totals on all lanes with random
// valid gaps; checks that with enable high each lane writes decision
// (total > 0) at consecutive addresses from 0 after start, and that with
// enable low nothing is written.
module tb_tentative_unit;
  import ldpc_pkg::*;
  localparam int P = 16, AW = $clog2(2*P);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, enable;
  logic tot_valid [LANES];
  sum_t tot [LANES];
  logic dm_we [LANES];
  logic [AW-1:0] dm_waddr [LANES];
  logic dm_wdata [LANES];
  tentative_unit #(.P(P)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    start = 0; enable = 0;
    for (int l = 0; l < LANES; l++) begin tot_valid[l] = 0; tot[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      int cnt [LANES];
      enable = (pass != 2);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      for (int l = 0; l < LANES; l++) cnt[l] = 0;
      for (int c = 0; c < 300; c++) begin
        for (int l = 0; l < LANES; l++) begin
          tot_valid[l] = (cnt[l] < 2*P) && ($urandom_range(0, 2) != 0);
          tot[l] = sum_t'($urandom_range(0, 300) - 150);
          if (c == 5) tot[l] = '0;   // zero decides 0
        end
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (dm_we[l] !== (tot_valid[l] && enable)) begin failures++; $display("FAIL we"); end
          if (tot_valid[l] && enable) begin
            checks++;
            if (int'(dm_waddr[l]) != cnt[l] || dm_wdata[l] !== (tot[l] > 0)) begin
              failures++; $display("FAIL lane %0d addr %0d/%0d", l, dm_waddr[l], cnt[l]);
            end
          end
          if (tot_valid[l]) cnt[l]++;
        end
        @(posedge clk);
        #1;
      end
      for (int l = 0; l < LANES; l++) tot_valid[l] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
