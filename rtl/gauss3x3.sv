// gauss3x3: combinational 3x3 Gaussian blur.
// Nine pixels of a 3x3 window arrive in raster order (din[4] is the centre).
// The result is (p0 + 2p1 + p2 + 2p3 + 4p4 + 2p5 + p6 + 2p7 + p8) / 16,
// truncated; it always fits 8 bits. The 72-bit input and 8-bit output follow
// the circuit this design is built around; the kernel weights are this
// design's choice of the usual binomial 3x3 kernel.
module gauss3x3 (
  input  logic [8:0][7:0] din,
  output logic [7:0]      dout
);
  logic [11:0] acc;

  always_comb begin
    acc = 12'(din[0]) + 12'(din[2]) + 12'(din[6]) + 12'(din[8])
        + ((12'(din[1]) + 12'(din[3]) + 12'(din[5]) + 12'(din[7])) << 1)
        + (12'(din[4]) << 2);
    dout = 8'(acc >> 4);
  end
endmodule
