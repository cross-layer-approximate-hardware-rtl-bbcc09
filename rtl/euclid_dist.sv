// euclid_dist: combinational squared Euclidean distance (no square root).
// The 32-bit input holds two 2-D points with unsigned 8-bit coordinates:
// din[0]=x1, din[1]=y1, din[2]=x2, din[3]=y2. The result is
// (x1-x2)^2 + (y1-y2)^2; that sum needs 17 bits and is saturated to the
// 16-bit output. The I/O widths follow the circuit this design is built
// around; the operand order and the saturation are this design's choice.
module euclid_dist (
  input  logic [3:0][7:0] din,
  output logic [15:0]     dout
);
  logic [7:0]  dx, dy;
  logic [16:0] sq;

  always_comb begin
    dx   = (din[0] > din[2]) ? din[0] - din[2] : din[2] - din[0];
    dy   = (din[1] > din[3]) ? din[1] - din[3] : din[3] - din[1];
    sq   = 17'(dx) * 17'(dx) + 17'(dy) * 17'(dy);
    dout = sq[16] ? 16'hFFFF : sq[15:0];
  end
endmodule
