// tb_acc_control: self-checking testbench for acc_control.
// Two control units are tested side by side: the default circuit set
// (exact + 96 % instantiations) and the set exact + 90 %. Random accuracy
// requests and valid bits are applied; one cycle after a request the
// instantiation enables and the gating count must match the table expected
// for that circuit set (written out below by hand), and two cycles later
// the multiplexer select, valid bit and accuracy tag must have followed.
module tb_acc_control;
  import acc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge starts the asynchronous reset
  acc_idx_t acc_req;
  logic     in_valid;
  int checks = 0, failures = 0;

  // circuit set A: levels 0 and 2; circuit set B: levels 0 and 3
  logic [1:0] en_a, en_b;
  logic [3:0] g_a, g_b;
  logic       sel_a, sel_b, v_a, v_b;
  acc_idx_t   acc_a, acc_b;

  acc_control #(.INST_MASK(4'b0101)) dut_a (
    .clk(clk), .rst_n(rst_n), .acc_req(acc_req), .in_valid(in_valid),
    .inst_en(en_a), .gate_cnt(g_a), .mux_sel(sel_a), .out_valid(v_a), .out_acc(acc_a));
  acc_control #(.INST_MASK(4'b1001)) dut_b (
    .clk(clk), .rst_n(rst_n), .acc_req(acc_req), .in_valid(in_valid),
    .inst_en(en_b), .gate_cnt(g_b), .mux_sel(sel_b), .out_valid(v_b), .out_acc(acc_b));

  // expected (select, gating count) per accuracy level
  int sel_exp_a [4] = '{0, 0, 1, 1};
  int gat_exp_a [4] = '{0, 1, 0, 1};
  int sel_exp_b [4] = '{0, 0, 0, 1};
  int gat_exp_b [4] = '{0, 1, 2, 0};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    int acc_hist [3];
    int v_hist [3];
    acc_req = '0; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (acc_hist[i]) begin acc_hist[i] = 0; v_hist[i] = 0; end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // the request registered at the last edge is acc_hist[0]
      if (c > 0) begin
        chk(g_a == 4'(gat_exp_a[acc_hist[0]]), "gating count, set A");
        chk(g_b == 4'(gat_exp_b[acc_hist[0]]), "gating count, set B");
      end
      in_valid = 1'($urandom);
      #1;
      if (c > 0) begin
        chk(en_a == (in_valid ? 2'(1 << sel_exp_a[acc_hist[0]]) : 2'b00), "enables, set A");
        chk(en_b == (in_valid ? 2'(1 << sel_exp_b[acc_hist[0]]) : 2'b00), "enables, set B");
      end
      if (c > 2) begin
        chk(v_a == 1'(v_hist[2]) && v_b == 1'(v_hist[2]), "valid after two cycles");
        if (v_hist[2] != 0) begin
          chk(acc_a == 2'(acc_hist[2]) && acc_b == 2'(acc_hist[2]), "accuracy tag");
          chk(sel_a == 1'(sel_exp_a[acc_hist[2]]), "mux select, set A");
          chk(sel_b == 1'(sel_exp_b[acc_hist[2]]), "mux select, set B");
        end
      end
      acc_req = 2'($urandom);
      // history: [0] request for this cycle's operation, [1],[2] older ones
      acc_hist[2] = acc_hist[1]; acc_hist[1] = acc_hist[0];
      v_hist[2] = v_hist[1];     v_hist[1] = int'(in_valid);
      acc_hist[0] = int'(acc_req);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
