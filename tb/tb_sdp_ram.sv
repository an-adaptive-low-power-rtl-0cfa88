// tb_sdp_ram: random writes and reads against an array model; checks the
// one-cycle read latency, read-before-write on a same-address collision,
// and that rdata holds while re is low.
module tb_sdp_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int DEPTH = 100, WIDTH = 6, AW = $clog2(DEPTH);
  logic we, re; logic [AW-1:0] waddr, raddr; logic [WIDTH-1:0] wdata, rdata;
  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [WIDTH-1:0] expd;
    logic             rd;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      logic [WIDTH-1:0] v;
      v = WIDTH'($urandom);
      we <= 1; waddr <= AW'(a); wdata <= v; model[a] = v;
      @(posedge clk);
    end
    rd = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [AW-1:0] wa, ra;
      logic [WIDTH-1:0] wd;
      logic w, r;
      wa = AW'($urandom_range(0, DEPTH-1));
      ra = (i % 7 == 0) ? wa : AW'($urandom_range(0, DEPTH-1));
      wd = WIDTH'($urandom);
      w = ($urandom_range(0, 1) == 1);
      r = ($urandom_range(0, 3) != 0);
      we <= w; waddr <= wa; wdata <= wd; re <= r; raddr <= ra;
      @(posedge clk);
      #1;
      if (r) expd = model[ra];
      if (w) model[wa] = wd;
      checks++;
      if (rdata !== expd) begin failures++; $display("FAIL read %0d got %0d exp %0d", ra, rdata, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
