// out_mux: m-to-1 result multiplexer between the instantiations.
// It is the slave-to-master multiplexer through which the instantiations of
// one circuit share a single result port; dout = din[sel], and a select
// beyond M-1 gives zero. Combinational: its select comes from a register in
// acc_control that is aligned with the instantiations' output registers.
// The multiplexer follows the architecture; the out-of-range rule is this
// design's choice.
module out_mux #(
  parameter int unsigned M = 2,
  parameter int unsigned W = 8,
  localparam int unsigned SEL_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0][W-1:0] din,
  input  logic [SEL_W-1:0]    sel,
  output logic [W-1:0]        dout
);
  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < M; i++)
      if (SEL_W'(i) == sel) dout = din[i];
  end
endmodule
