// sdp_ram: simple dual-port synchronous RAM, one write port and one read port.
//
// Used for the eight edge-message memories MEM0..MEM7 (3*2P words of MSG_W
// bits each), the eight channel-LLR banks (2P words) and the eight banks of
// the decision memory (2P one-bit words). A write and a read may hit
// different addresses in the same cycle. Reads are registered: rdata holds
// the word at raddr one clock after re is high and keeps it while re is low,
// so an idle memory does not toggle its output. A read of the address being
// written returns the old word. Contents are not reset; the decoder never
// reads a word it has not written in the current frame.
// The memories are part of the published architecture; their port
// structure and read timing are this design's choice.
module sdp_ram #(
  parameter int DEPTH = 3456,
  parameter int WIDTH = 6,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
