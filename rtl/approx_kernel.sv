// approx_kernel: selects one of the five combinational kernels by parameter.
// It lets one instantiation template (approx_instance) serve every circuit:
// the operand vector is din[n_elem(KERNEL)-1:0], each operand 8 bits, and the
// result has out_w(KERNEL) bits. Purely combinational, no timing of its own.
module approx_kernel
  import acc_pkg::*;
#(
  parameter kernel_e KERNEL = K_SOBEL,
  localparam int unsigned NE = n_elem(KERNEL),
  localparam int unsigned OW = out_w(KERNEL)
) (
  input  logic [NE-1:0][PIX_W-1:0] din,
  output logic [OW-1:0]            dout
);
  if (KERNEL == K_SOBEL) begin : g_sobel
    sobel3x3 u_k (.din(din), .dout(dout));
  end else if (KERNEL == K_GAUSS) begin : g_gauss
    gauss3x3 u_k (.din(din), .dout(dout));
  end else if (KERNEL == K_FIR) begin : g_fir
    fir4 u_k (.din(din), .dout(dout));
  end else if (KERNEL == K_NEURON) begin : g_neuron
    relu_neuron8 u_k (.din(din), .dout(dout));
  end else begin : g_euclid
    euclid_dist u_k (.din(din), .dout(dout));
  end
endmodule
