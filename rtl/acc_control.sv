// acc_control: control unit of the accuracy-configurable block.
// The requested accuracy index (log2 of the number of levels, bits) is
// registered one cycle ahead of the operation it applies to. A constant
// look-up table, computed at elaboration from INST_MASK and the per-level
// discarded LSB counts, maps that index to a circuit select and a gating
// count: a level that has its own instantiation uses it ungated; any other
// level uses the nearest more accurate instantiation with the LSB columns
// between the two precisions clock-gated. In the cycle after acc_req was
// registered, inst_en enables exactly the selected instantiation when
// in_valid is high (all are frozen in idle cycles) and gate_cnt carries the
// gating count. Select, valid and accuracy index then travel two register
// stages to line up with the instantiations' output registers, where they
// drive the output multiplexer and tag the result.
// The table, the one-cycle-ahead request and the propagation of the accuracy
// to later stages follow the architecture; the count encoding of the gating
// signals and the valid bit are this design's choices.
module acc_control
  import acc_pkg::*;
#(
  parameter logic [N_ACC-1:0] INST_MASK = 4'b0101,
  localparam int unsigned NUM_INST = popcount_below(INST_MASK, N_ACC),
  localparam int unsigned SEL_W = (NUM_INST > 1) ? $clog2(NUM_INST) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  acc_idx_t            acc_req,
  input  logic                in_valid,
  output logic [NUM_INST-1:0] inst_en,
  output logic [GATE_W-1:0]   gate_cnt,
  output logic [SEL_W-1:0]    mux_sel,
  output logic                out_valid,
  output acc_idx_t            out_acc
);
  typedef struct packed {
    logic [SEL_W-1:0]  sel;
    logic [GATE_W-1:0] gate;
  } cfg_t;
  // Table entry for accuracy level a (Algorithm: own circuit if present,
  // otherwise the nearest more accurate circuit, gated down to level a).
  function automatic cfg_t lut_entry(int unsigned a);
    cfg_t e;
    int unsigned s;
    s      = serving_level(INST_MASK, a);
    e.sel  = SEL_W'(popcount_below(INST_MASK, s));
    e.gate = GATE_W'(DROP_LSBS[a] - DROP_LSBS[s]);
    return e;
  endfunction

  cfg_t lut [N_ACC];

  for (genvar a = 0; a < N_ACC; a++) begin : g_lut
    localparam cfg_t ENTRY = lut_entry(a);
    assign lut[a] = ENTRY;
  end

  if (!INST_MASK[0]) begin : g_chk
    $error("acc_control: the exact circuit (level 0) must be instantiated");
  end

  acc_idx_t         acc_q, acc_s1;
  cfg_t             cfg;
  logic [SEL_W-1:0] sel_s1;
  logic             v_s1;

  assign cfg = lut[acc_q];

  always_comb begin
    for (int unsigned j = 0; j < NUM_INST; j++)
      inst_en[j] = in_valid && (cfg.sel == SEL_W'(j));
  end
  assign gate_cnt = cfg.gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      acc_s1    <= '0;
      sel_s1    <= '0;
      v_s1      <= 1'b0;
      out_acc   <= '0;
      mux_sel   <= '0;
      out_valid <= 1'b0;
    end else begin
      acc_q     <= acc_req;
      acc_s1    <= acc_q;
      sel_s1    <= cfg.sel;
      v_s1      <= in_valid;
      out_acc   <= acc_s1;
      mux_sel   <= sel_s1;
      out_valid <= v_s1;
    end
  end

  always_comb begin
    assert ($onehot0(inst_en)) else $error("acc_control: more than one instantiation enabled");
  end
endmodule
