// tb_acc_config_block: self-checking testbench for acc_config_block.
// Two blocks run side by side: the default Sobel block (exact and 96 %
// instantiations) and a FIR block with exact, 98 % and 90 % instantiations.
// Each cycle the testbench names a random accuracy for the next operation
// and presents the current operation's operands (or an idle cycle). The
// tb_ref_pkg::acc_model predicts every result, including the effect of
// clock-gated LSB columns and of frozen instantiations. A result must
// arrive exactly two clock edges after its request was registered, i.e. one
// edge after its operands were sampled, with the right accuracy tag; idle
// cycles must produce no valid result. The per-copy result registers
// (memory-mapped view) must hold the same result in the copy dout_sel names.
module tb_acc_config_block;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_OPS = 4000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge starts the asynchronous reset
  acc_idx_t acc_s, acc_f, oacc_s, oacc_f;
  logic v_s, v_f, ov_s, ov_f;
  logic [7:0][7:0] din_s;
  logic [0:0][7:0] din_f;
  logic [7:0]  dout_s;
  logic [15:0] dout_f;
  logic [1:0][7:0]  idout_s;   // per-copy result registers (memory-mapped view)
  logic [2:0][15:0] idout_f;
  logic       dsel_s;
  logic [1:0] dsel_f;
  int checks = 0, failures = 0;

  acc_config_block #(.KERNEL(K_SOBEL)) dut_s (
    .clk(clk), .rst_n(rst_n), .acc_req(acc_s), .in_valid(v_s), .din(din_s),
    .dout(dout_s), .dout_valid(ov_s), .dout_acc(oacc_s),
    .inst_dout(idout_s), .dout_sel(dsel_s));
  acc_config_block #(.KERNEL(K_FIR), .INST_MASK(4'b1011)) dut_f (
    .clk(clk), .rst_n(rst_n), .acc_req(acc_f), .in_valid(v_f), .din(din_f),
    .dout(dout_f), .dout_valid(ov_f), .dout_acc(oacc_f),
    .inst_dout(idout_f), .dout_sel(dsel_f));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_OPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // position of level s's copy among the built copies
  function automatic int copy_pos(bit [3:0] mask, int s);
    int p = 0;
    for (int i = 0; i < s; i++) if (mask[i]) p++;
    return p;
  endfunction

  initial begin
    acc_model ms = new(K_SOBEL, 4'b0101);
    acc_model mf = new(K_FIR, 4'b1011);
    int ev_s [N_OPS], ev_f [N_OPS], ea_s [N_OPS], ea_f [N_OPS], er_s [N_OPS], er_f [N_OPS];
    int next_s, next_f;
    uvec9_t d;
    acc_s = '0; acc_f = '0; v_s = 0; v_f = 0; din_s = '0; din_f = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    next_s = $urandom % 4; next_f = $urandom % 4;
    acc_s = 2'(next_s); acc_f = 2'(next_f);
    for (int c = 0; c < N_OPS; c++) begin
      @(negedge clk);
      if (c >= 2) begin
        chk(ov_s == 1'(ev_s[c-2]), "sobel valid timing");
        chk(ov_f == 1'(ev_f[c-2]), "fir valid timing");
        if (ev_s[c-2] != 0) begin
          chk(int'(dout_s) == er_s[c-2] && int'(oacc_s) == ea_s[c-2], "sobel result");
          chk(int'(dsel_s) == copy_pos(4'b0101, ms.serving(ea_s[c-2]))
              && int'(idout_s[dsel_s]) == er_s[c-2], "sobel memory-mapped result");
        end
        if (ev_f[c-2] != 0) begin
          chk(int'(dout_f) == er_f[c-2] && int'(oacc_f) == ea_f[c-2], "fir result");
          chk(int'(dsel_f) == copy_pos(4'b1011, mf.serving(ea_f[c-2]))
              && int'(idout_f[dsel_f]) == er_f[c-2], "fir memory-mapped result");
        end
      end
      // operation c: accuracy already requested last cycle
      ev_s[c] = ($urandom % 5 != 0); ea_s[c] = next_s;
      ev_f[c] = ($urandom % 5 != 0); ea_f[c] = next_f;
      foreach (d[i]) d[i] = $urandom % 256;
      for (int e = 0; e < 8; e++) din_s[e] = 8'(d[e]);
      if (ev_s[c] != 0) er_s[c] = ms.step(next_s, d);
      foreach (d[i]) d[i] = $urandom % 256;
      din_f[0] = 8'(d[0]);
      if (ev_f[c] != 0) er_f[c] = mf.step(next_f, d);
      v_s = 1'(ev_s[c]); v_f = 1'(ev_f[c]);
      // request for operation c+1: often unchanged, sometimes switched
      if ($urandom % 3 == 0) next_s = $urandom % 4;
      if ($urandom % 3 == 0) next_f = $urandom % 4;
      acc_s = 2'(next_s); acc_f = 2'(next_f);
    end
    chk(ms.switches > 0 && ms.gated_ops > 0 && mf.switches > 0 && mf.gated_ops > 0,
        "instantiation switches and gated operations exercised");
    $display("sobel: %0d ops, %0d switches, %0d gated; fir: %0d ops, %0d switches, %0d gated",
             ms.ops, ms.switches, ms.gated_ops, mf.ops, mf.switches, mf.gated_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
