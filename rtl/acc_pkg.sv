// acc_pkg: types and constants shared by the runtime accuracy-configurable
// datapath. A design is a set of instantiations of one arithmetic kernel,
// each with a fixed number of discarded operand LSBs; the package names the
// kernels, gives each kernel's operand count and result width, and holds the
// accuracy levels and the precision each one uses.
//
// The four accuracy levels (100/98/96/90 %, index 0..3) follow the workloads
// this architecture was evaluated with. How many LSBs each level discards is
// this design's own choice (0/1/2/3), as is everything about the kernels
// beyond their function and I/O widths.
package acc_pkg;

  localparam int unsigned PIX_W = 8;          // operand width of every kernel
  localparam int unsigned N_ACC = 4;          // number of accuracy levels
  localparam int unsigned ACC_W = $clog2(N_ACC);
  localparam int unsigned GATE_W = 4;         // width of the gated-LSB count

  typedef logic [ACC_W-1:0] acc_idx_t;

  // Accuracy levels in percent, most accurate first.
  localparam int unsigned ACC_PCT [N_ACC] = '{100, 98, 96, 90};
  // Operand LSBs discarded to reach each level (precision scaling).
  localparam int unsigned DROP_LSBS [N_ACC] = '{0, 1, 2, 3};

  typedef enum logic [2:0] {
    K_SOBEL  = 3'd0,   // 3x3 Sobel edge magnitude, 8 pixels in, 8 bits out
    K_GAUSS  = 3'd1,   // 3x3 Gaussian blur, 9 pixels in, 8 bits out
    K_FIR    = 3'd2,   // 4-tap FIR, 8-bit sample in, 16 bits out
    K_NEURON = 3'd3,   // 8-input ReLU neuron, 8 bits out
    K_EUCLID = 3'd4    // squared Euclidean distance of two 2-D points
  } kernel_e;

  // Number of 8-bit operands the kernel reads per operation (FIR: the taps).
  function automatic int unsigned n_elem(kernel_e k);
    case (k)
      K_SOBEL:  return 8;
      K_GAUSS:  return 9;
      K_FIR:    return 4;
      K_NEURON: return 8;
      default:  return 4;
    endcase
  endfunction

  // Number of 8-bit operands arriving at the input port per operation.
  function automatic int unsigned n_in(kernel_e k);
    return (k == K_FIR) ? 1 : n_elem(k);
  endfunction

  function automatic int unsigned out_w(kernel_e k);
    return (k == K_FIR || k == K_EUCLID) ? 16 : 8;
  endfunction

  // Count of set bits in the low n bits of a mask.
  function automatic int unsigned popcount_below(logic [N_ACC-1:0] mask, int unsigned n);
    int unsigned c = 0;
    for (int unsigned i = 0; i < N_ACC; i++)
      if (i < n && mask[i]) c++;
    return c;
  endfunction

  // Instantiation that serves accuracy level a: the level itself if it is
  // instantiated, otherwise the nearest more accurate instantiated level.
  // Level 0 (exact) must always be instantiated.
  function automatic int unsigned serving_level(logic [N_ACC-1:0] mask, int unsigned a);
    for (int i = int'(a); i >= 0; i--)
      if (mask[i]) return unsigned'(i);
    return 0;
  endfunction

endpackage
