// relu_neuron8: combinational 8-input neuron with ReLU activation.
// Eight unsigned 8-bit activations are multiplied by signed constant weights,
// summed with a signed bias, passed through ReLU (negative sums become 0),
// shifted right by SHIFT and saturated to 8 bits. The 64-bit input and 8-bit
// output follow the circuit this design is built around; weights, bias and
// output scaling are this design's choice, exposed as parameters.
module relu_neuron8 #(
  parameter logic signed [7:0] W0 = 8'sd3,
  parameter logic signed [7:0] W1 = -8'sd2,
  parameter logic signed [7:0] W2 = 8'sd5,
  parameter logic signed [7:0] W3 = 8'sd1,
  parameter logic signed [7:0] W4 = -8'sd4,
  parameter logic signed [7:0] W5 = 8'sd2,
  parameter logic signed [7:0] W6 = 8'sd6,
  parameter logic signed [7:0] W7 = -8'sd1,
  parameter logic signed [15:0] BIAS = -16'sd64,
  parameter int unsigned SHIFT = 4
) (
  input  logic [7:0][7:0] din,
  output logic [7:0]      dout
);
  logic signed [7:0]  w [8];
  logic signed [19:0] sum;
  logic        [19:0] act;

  assign w = '{W0, W1, W2, W3, W4, W5, W6, W7};

  always_comb begin
    sum = 20'(BIAS);
    for (int i = 0; i < 8; i++)
      sum += $signed({12'b0, din[i]}) * 20'(w[i]);
    act  = sum[19] ? 20'd0 : (unsigned'(sum) >> SHIFT);
    dout = (act > 20'd255) ? 8'd255 : act[7:0];
  end
endmodule
