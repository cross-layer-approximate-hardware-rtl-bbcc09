// sobel3x3: combinational 3x3 Sobel edge magnitude.
// The eight neighbour pixels of a 3x3 window (the centre is not used) arrive
// in raster order: p0 p1 p2 / p3 . p4 / p5 p6 p7. The horizontal and vertical
// gradients are Gx = (p2 + 2 p4 + p7) - (p0 + 2 p3 + p5) and
// Gy = (p5 + 2 p6 + p7) - (p0 + 2 p1 + p2); the result is |Gx| + |Gy|,
// saturated to 255. The 64-bit input and 8-bit output follow the circuit this
// design is built around; the coefficients and the |Gx|+|Gy| magnitude are
// this design's choice of the usual Sobel formulation.
module sobel3x3 (
  input  logic [7:0][7:0] din,   // din[i] = p_i
  output logic [7:0]      dout
);
  logic signed [11:0] gx, gy;
  logic        [11:0] ax, ay;
  logic        [12:0] mag;

  always_comb begin
    gx  = 12'($signed({4'b0, din[2]}) + ($signed({4'b0, din[4]}) <<< 1) + $signed({4'b0, din[7]})
            - $signed({4'b0, din[0]}) - ($signed({4'b0, din[3]}) <<< 1) - $signed({4'b0, din[5]}));
    gy  = 12'($signed({4'b0, din[5]}) + ($signed({4'b0, din[6]}) <<< 1) + $signed({4'b0, din[7]})
            - $signed({4'b0, din[0]}) - ($signed({4'b0, din[1]}) <<< 1) - $signed({4'b0, din[2]}));
    ax  = gx[11] ? 12'(-gx) : 12'(gx);
    ay  = gy[11] ? 12'(-gy) : 12'(gy);
    mag = {1'b0, ax} + {1'b0, ay};
    dout = (mag > 13'd255) ? 8'd255 : mag[7:0];
  end
endmodule
