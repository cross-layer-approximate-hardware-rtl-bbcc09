// acc_config_block: runtime accuracy-configurable version of one kernel.
// It holds one approx_instance per accuracy level set in INST_MASK (bit a =
// level a, level 0 = exact and always present), each discarding
// DROP_LSBS[a] operand LSBs, plus acc_control and the out_mux that joins their
// results. Every cycle, the caller names the accuracy for the next cycle's
// operation (acc_req); in that next cycle it presents the operands with
// in_valid. The control unit enables the one instantiation serving that
// accuracy and clock-gates its surplus LSB columns; all other
// instantiations stay clock-gated and keep their state.
// Timing: acc_req sampled at edge k; operands sampled at edge k+1; dout,
// dout_valid and dout_acc valid after edge k+2 (one result per cycle, no
// back-pressure). Asynchronous active-low reset; after reset the accuracy
// index is 0 (exact).
// Integration: a host on a shared bus reads dout, the multiplexed result. A
// host that maps each copy at its own address instead reads
// inst_dout[dout_sel] and needs no multiplexer; synthesis drops the
// multiplexer when dout is left open. Both styles of attaching the copies
// follow the architecture.
// The structure (instantiations at fixed accuracies, gating inside them, a
// look-up-table control unit, a result multiplexer) follows the
// architecture. The default circuit set, the exact circuit plus the 96 %
// circuit, is this design's reading of the solution chosen for the Sobel
// filter at twice the exact area.
module acc_config_block
  import acc_pkg::*;
#(
  parameter kernel_e          KERNEL    = K_SOBEL,
  parameter logic [N_ACC-1:0] INST_MASK = 4'b0101,
  localparam int unsigned NI       = n_in(KERNEL),
  localparam int unsigned OW       = out_w(KERNEL),
  localparam int unsigned NUM_INST = popcount_below(INST_MASK, N_ACC),
  localparam int unsigned SEL_W    = (NUM_INST > 1) ? $clog2(NUM_INST) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  acc_idx_t                 acc_req,
  input  logic                     in_valid,
  input  logic [NI-1:0][PIX_W-1:0] din,
  output logic [OW-1:0]            dout,
  output logic                     dout_valid,
  output acc_idx_t                 dout_acc,
  // memory-mapped view: every copy's result register, and which one holds
  // the latest result
  output logic [NUM_INST-1:0][OW-1:0] inst_dout,
  output logic [SEL_W-1:0]            dout_sel
);
  logic [NUM_INST-1:0]         inst_en;
  logic [GATE_W-1:0]           gate_cnt;
  logic [SEL_W-1:0]            mux_sel;
  logic [NUM_INST-1:0][OW-1:0] inst_out;

  acc_control #(.INST_MASK(INST_MASK)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .acc_req  (acc_req),
    .in_valid (in_valid),
    .inst_en  (inst_en),
    .gate_cnt (gate_cnt),
    .mux_sel  (mux_sel),
    .out_valid(dout_valid),
    .out_acc  (dout_acc)
  );

  for (genvar a = 0; a < N_ACC; a++) begin : g_inst
    if (INST_MASK[a]) begin : g_on
      localparam int unsigned J = popcount_below(INST_MASK, a);
      approx_instance #(.KERNEL(KERNEL), .DROP(DROP_LSBS[a])) u_inst (
        .clk     (clk),
        .rst_n   (rst_n),
        .en      (inst_en[J]),
        .gate_cnt(gate_cnt),
        .din     (din),
        .dout    (inst_out[J])
      );
    end
  end

  out_mux #(.M(NUM_INST), .W(OW)) u_mux (.din(inst_out), .sel(mux_sel), .dout(dout));

  assign inst_dout = inst_out;
  assign dout_sel  = mux_sel;
endmodule
