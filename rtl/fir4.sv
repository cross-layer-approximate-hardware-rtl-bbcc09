// fir4: combinational part of a 4-tap FIR filter.
// din[0] is the newest sample x[n], din[3] the oldest x[n-3]; the delay line
// that supplies them is the input register of the enclosing instantiation
// (approx_instance), so samples advance one stage per accepted input.
// y[n] = C0 x[n] + C1 x[n-1] + C2 x[n-2] + C3 x[n-3] with unsigned 8-bit
// coefficients. The 8-bit sample and 16-bit output follow the circuit this
// design is built around; the default coefficients (32, 96, 96, 32, summing to
// 256 so the output never overflows) are this design's choice.
module fir4 #(
  parameter logic [7:0] C0 = 8'd32,
  parameter logic [7:0] C1 = 8'd96,
  parameter logic [7:0] C2 = 8'd96,
  parameter logic [7:0] C3 = 8'd32
) (
  input  logic [3:0][7:0] din,
  output logic [15:0]     dout
);
  logic [17:0] acc;

  always_comb begin
    acc  = 18'(din[0]) * 18'(C0) + 18'(din[1]) * 18'(C1)
         + 18'(din[2]) * 18'(C2) + 18'(din[3]) * 18'(C3);
    dout = (acc > 18'hFFFF) ? 16'hFFFF : acc[15:0];
  end
endmodule
