// tb_xbar_rot: exhaustive check of both crossbar directions for every
// rotation with random data, and that the inverse undoes the forward one.
module tb_xbar_rot;
  localparam int W = 6, L = 8;
  logic [2:0] rot;
  logic [W-1:0] din [L], fwd [L], back [L];
  xbar_rot #(.WIDTH(W), .LANES(L), .INVERSE(1'b0)) u_f (.rot, .din, .dout(fwd));
  xbar_rot #(.WIDTH(W), .LANES(L), .INVERSE(1'b1)) u_b (.rot, .din(fwd), .dout(back));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 50; it++)
      for (int r = 0; r < L; r++) begin
        rot = 3'(r);
        for (int i = 0; i < L; i++) din[i] = W'($urandom);
        #1;
        for (int i = 0; i < L; i++) begin
          checks += 2;
          if (fwd[i] !== din[(i + r) % L]) begin failures++; $display("FAIL fwd rot %0d lane %0d", r, i); end
          if (back[i] !== din[i]) begin failures++; $display("FAIL inverse rot %0d lane %0d", r, i); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
