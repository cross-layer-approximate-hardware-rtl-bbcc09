// acc_config_top: five runtime accuracy-configurable datapaths side by side.
// Each of the five kernels (3x3 Sobel, 3x3 Gaussian, 4-tap FIR, 8-input ReLU
// neuron, squared Euclidean distance) is wrapped as an acc_config_block with
// its own accuracy request, operand and result ports; the blocks share only
// clock and reset. Per block: acc_req names one of four accuracy levels
// (0 = exact, 1 = 98 %, 2 = 96 %, 3 = 90 %) for the operation of the
// following cycle, the operands come with in_valid in that cycle, and the
// result with dout_valid and dout_acc two clock edges after the operands
// were sampled. One operation per block per cycle. <k>_inst_dout carries
// every copy's result register and <k>_dout_sel the copy holding the latest
// result, for hosts that map the copies at separate addresses instead of
// reading the multiplexed <k>_dout.
// All blocks use the same circuit set INST_MASK (default: an exact
// instantiation, gated for 98 %, and a 96 % instantiation, gated for 90 %).
// That set is the one reported best for the Sobel filter at twice the exact
// area; using it for the other four kernels is this design's choice.
module acc_config_top
  import acc_pkg::*;
#(
  parameter logic [N_ACC-1:0] INST_MASK = 4'b0101,
  localparam int unsigned NUM_INST = popcount_below(INST_MASK, N_ACC),
  localparam int unsigned SEL_W    = (NUM_INST > 1) ? $clog2(NUM_INST) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // sobel
  input  acc_idx_t          sobel_acc_req,
  input  logic              sobel_in_valid,
  input  logic [8-1:0][7:0] sobel_din,
  output logic [8-1:0]     sobel_dout,
  output logic              sobel_dout_valid,
  output acc_idx_t          sobel_dout_acc,
  output logic [NUM_INST-1:0][8-1:0] sobel_inst_dout,
  output logic [SEL_W-1:0]  sobel_dout_sel,
  // gauss
  input  acc_idx_t          gauss_acc_req,
  input  logic              gauss_in_valid,
  input  logic [9-1:0][7:0] gauss_din,
  output logic [8-1:0]     gauss_dout,
  output logic              gauss_dout_valid,
  output acc_idx_t          gauss_dout_acc,
  output logic [NUM_INST-1:0][8-1:0] gauss_inst_dout,
  output logic [SEL_W-1:0]  gauss_dout_sel,
  // fir
  input  acc_idx_t          fir_acc_req,
  input  logic              fir_in_valid,
  input  logic [1-1:0][7:0] fir_din,
  output logic [16-1:0]     fir_dout,
  output logic              fir_dout_valid,
  output acc_idx_t          fir_dout_acc,
  output logic [NUM_INST-1:0][16-1:0] fir_inst_dout,
  output logic [SEL_W-1:0]  fir_dout_sel,
  // neuron
  input  acc_idx_t          neuron_acc_req,
  input  logic              neuron_in_valid,
  input  logic [8-1:0][7:0] neuron_din,
  output logic [8-1:0]     neuron_dout,
  output logic              neuron_dout_valid,
  output acc_idx_t          neuron_dout_acc,
  output logic [NUM_INST-1:0][8-1:0] neuron_inst_dout,
  output logic [SEL_W-1:0]  neuron_dout_sel,
  // euclid
  input  acc_idx_t          euclid_acc_req,
  input  logic              euclid_in_valid,
  input  logic [4-1:0][7:0] euclid_din,
  output logic [16-1:0]     euclid_dout,
  output logic              euclid_dout_valid,
  output acc_idx_t          euclid_dout_acc,
  output logic [NUM_INST-1:0][16-1:0] euclid_inst_dout,
  output logic [SEL_W-1:0]  euclid_dout_sel
);
  acc_config_block #(.KERNEL(K_SOBEL), .INST_MASK(INST_MASK)) u_sobel (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_req   (sobel_acc_req),
    .in_valid  (sobel_in_valid),
    .din       (sobel_din),
    .dout      (sobel_dout),
    .dout_valid(sobel_dout_valid),
    .dout_acc  (sobel_dout_acc),
    .inst_dout (sobel_inst_dout),
    .dout_sel  (sobel_dout_sel)
  );

  acc_config_block #(.KERNEL(K_GAUSS), .INST_MASK(INST_MASK)) u_gauss (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_req   (gauss_acc_req),
    .in_valid  (gauss_in_valid),
    .din       (gauss_din),
    .dout      (gauss_dout),
    .dout_valid(gauss_dout_valid),
    .dout_acc  (gauss_dout_acc),
    .inst_dout (gauss_inst_dout),
    .dout_sel  (gauss_dout_sel)
  );

  acc_config_block #(.KERNEL(K_FIR), .INST_MASK(INST_MASK)) u_fir (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_req   (fir_acc_req),
    .in_valid  (fir_in_valid),
    .din       (fir_din),
    .dout      (fir_dout),
    .dout_valid(fir_dout_valid),
    .dout_acc  (fir_dout_acc),
    .inst_dout (fir_inst_dout),
    .dout_sel  (fir_dout_sel)
  );

  acc_config_block #(.KERNEL(K_NEURON), .INST_MASK(INST_MASK)) u_neuron (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_req   (neuron_acc_req),
    .in_valid  (neuron_in_valid),
    .din       (neuron_din),
    .dout      (neuron_dout),
    .dout_valid(neuron_dout_valid),
    .dout_acc  (neuron_dout_acc),
    .inst_dout (neuron_inst_dout),
    .dout_sel  (neuron_dout_sel)
  );

  acc_config_block #(.KERNEL(K_EUCLID), .INST_MASK(INST_MASK)) u_euclid (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc_req   (euclid_acc_req),
    .in_valid  (euclid_in_valid),
    .din       (euclid_din),
    .dout      (euclid_dout),
    .dout_valid(euclid_dout_valid),
    .dout_acc  (euclid_dout_acc),
    .inst_dout (euclid_inst_dout),
    .dout_sel  (euclid_dout_sel)
  );
endmodule
