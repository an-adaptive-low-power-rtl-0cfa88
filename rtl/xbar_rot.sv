// xbar_rot: the interconnect between the eight memory banks and the eight
// check node units / parity-check lanes.
//
// Because the code construction puts slot s of row block r into bank
// (r + s) mod LANES, the bank-to-unit pattern in any one cycle is a rotation
// by the current slot. With INVERSE = 0 the crossbar carries data from banks
// to units: dout[r] = din[(r + rot) mod LANES]. With INVERSE = 1 it carries
// unit results back to banks: dout[m] = din[(m - rot) mod LANES]. Purely
// combinational; rot must be in 0..LANES-1. The published architecture
// has a crossbar here; reducing it to a rotation is possible because of
// this design's own code construction.
module xbar_rot #(
  parameter int WIDTH   = 6,
  parameter int LANES   = 8,
  parameter bit INVERSE = 1'b0
) (
  input  logic [$clog2(LANES)-1:0] rot,
  input  logic [WIDTH-1:0]         din  [LANES],
  output logic [WIDTH-1:0]         dout [LANES]
);
  localparam int RW = $clog2(LANES);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic [RW:0] sel;
      if (INVERSE) sel = (RW+1)'(i) + (RW+1)'(LANES) - (RW+1)'(rot);
      else         sel = (RW+1)'(i) + (RW+1)'(rot);
      if (sel >= (RW+1)'(LANES)) sel = sel - (RW+1)'(LANES);
      dout[i] = din[sel[RW-1:0]];
    end
  end
endmodule
