// approx_instance: one fixed-accuracy instantiation Ckt_acc of a kernel.
// Precision scaling: the DROP least significant bits of every 8-bit operand
// are discarded, i.e. they are constant zero and have no flip-flops, so
// synthesis removes the logic they fed and can relax the remaining paths.
// Gating: the input register is split into bit columns (one column = the
// same bit position of every operand), each clocked through its own
// clock_gate. Column b captures in a cycle only if en is high and
// b >= DROP + gate_cnt; the gate_cnt lowest kept columns therefore keep their
// old contents, lowering the accuracy further at run time without any
// change to the datapath. With en low the whole instantiation is frozen.
// For the FIR kernel the input register is the 4-sample delay line: an
// accepted sample enters stage 0 and older samples move one stage on.
// The result is registered in a clock-gated output register that captures
// one cycle after the operands (en delayed by one ungated flip-flop).
// Timing: operands captured at edge k (en high before it) -> dout valid after
// edge k+1. Asynchronous active-low reset clears every register.
// Discarding LSBs and gating the LSB input registers follow the architecture;
// the column-wise gating and the one-cycle output register are this design's
// choices.
module approx_instance
  import acc_pkg::*;
#(
  parameter kernel_e     KERNEL = K_SOBEL,
  parameter int unsigned DROP   = 0,
  localparam int unsigned NE = n_elem(KERNEL),
  localparam int unsigned NI = n_in(KERNEL),
  localparam int unsigned OW = out_w(KERNEL)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [GATE_W-1:0]        gate_cnt,
  input  logic [NI-1:0][PIX_W-1:0] din,
  output logic [OW-1:0]            dout
);
  wire  [NE-1:0][PIX_W-1:0] opnd;   // registered, precision-scaled operands
  logic [OW-1:0]            res;
  logic                     en_q;
  logic                     gclk_out;

  for (genvar b = 0; b < PIX_W; b++) begin : g_col
    if (b < DROP) begin : g_drop
      for (genvar e = 0; e < NE; e++) begin : g_zero
        assign opnd[e][b] = 1'b0;
      end
    end else begin : g_keep
      logic          col_en, gclk_col;
      logic [NE-1:0] col;

      assign col_en = en && ((GATE_W + 1)'(b - DROP) >= {1'b0, gate_cnt});
      clock_gate u_cg (.clk(clk), .en(col_en), .gclk(gclk_col));

      logic [NE-1:0] col_d;
      if (KERNEL == K_FIR) begin : g_shift
        assign col_d = {col[NE-2:0], din[0][b]};
      end else begin : g_load
        for (genvar e = 0; e < NE; e++) begin : g_in
          assign col_d[e] = din[e][b];
        end
      end

      always_ff @(posedge gclk_col or negedge rst_n) begin
        if (!rst_n) col <= '0;
        else        col <= col_d;
      end

      for (genvar e = 0; e < NE; e++) begin : g_bit
        assign opnd[e][b] = col[e];
      end
    end
  end

  approx_kernel #(.KERNEL(KERNEL)) u_kernel (.din(opnd), .dout(res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  clock_gate u_cg_out (.clk(clk), .en(en_q), .gclk(gclk_out));

  always_ff @(posedge gclk_out or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= res;
  end
endmodule
