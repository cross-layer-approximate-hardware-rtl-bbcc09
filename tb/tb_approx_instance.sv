// tb_approx_instance: self-checking testbench for approx_instance.
// Two instantiations are tested: a Sobel instantiation discarding 1 LSB and
// a FIR instantiation discarding 2 LSBs (its input register is the sample
// delay line). Enable and gating count are random. The model keeps the
// operand registers: discarded bits read 0, gated bit columns and disabled
// cycles keep the old contents. A result must appear exactly one clock edge
// after its operands were captured and must then stay unchanged while the
// instantiation is disabled.
module tb_approx_instance;
  import acc_pkg::*;
  import tb_ref_pkg::uvec9_t;
  import tb_ref_pkg::ref_kernel;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge starts the asynchronous reset
  logic en_s, en_f;
  logic [3:0] g_s, g_f;
  logic [7:0][7:0] din_s;
  logic [0:0][7:0] din_f;
  logic [7:0]  dout_s;
  logic [15:0] dout_f;
  int checks = 0, failures = 0;
  int gated_seen = 0, hold_seen = 0;

  approx_instance #(.KERNEL(K_SOBEL), .DROP(1)) dut_s (
    .clk(clk), .rst_n(rst_n), .en(en_s), .gate_cnt(g_s), .din(din_s), .dout(dout_s));
  approx_instance #(.KERNEL(K_FIR), .DROP(2)) dut_f (
    .clk(clk), .rst_n(rst_n), .en(en_f), .gate_cnt(g_f), .din(din_f), .dout(dout_f));

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

  // update operand registers: bits below drop+gate keep their value
  function automatic void upd(ref int unsigned r [9], input int unsigned nw [9],
                              input int ne, input int drop, input int gate);
    int unsigned keep = ((32'hFF >> (drop + gate)) << (drop + gate)) & 32'hFF;
    for (int e = 0; e < ne; e++) r[e] = (r[e] & ~keep & 32'hFF) | (nw[e] & keep);
  endfunction

  initial begin
    int unsigned rs [9], rf [9], nw [9];
    uvec9_t x;
    int exp_s, exp_f, prev_en_s, prev_en_f;
    foreach (rs[i]) begin rs[i] = 0; rf[i] = 0; end
    en_s = 0; en_f = 0; g_s = 0; g_f = 0; din_s = '0; din_f = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_s = 0; exp_f = 0; prev_en_s = 0; prev_en_f = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // results of the operands captured two edges back are now visible
      chk(int'(dout_s) == exp_s, "sobel instantiation result");
      chk(int'(dout_f) == exp_f, "fir instantiation result");
      if (prev_en_s == 0) hold_seen++;
      // model the capture that happened at the last edge
      prev_en_s = int'(en_s); prev_en_f = int'(en_f);
      if (en_s) begin
        for (int e = 0; e < 8; e++) nw[e] = din_s[e];
        upd(rs, nw, 8, 1, int'(g_s));
        foreach (x[i]) x[i] = rs[i];
        exp_s = ref_kernel(tb_ref_pkg::K_SOBEL, x);
        if (g_s != 0) gated_seen++;
      end
      if (en_f) begin
        nw[0] = din_f[0]; nw[1] = rf[0]; nw[2] = rf[1]; nw[3] = rf[2];
        upd(rf, nw, 4, 2, int'(g_f));
        foreach (x[i]) x[i] = (i < 4) ? rf[i] : 0;
        exp_f = ref_kernel(tb_ref_pkg::K_FIR, x);
      end
      // operands for the next edge
      en_s = 1'($urandom % 4 != 0);
      en_f = 1'($urandom % 4 != 0);
      g_s  = 4'($urandom % 4);
      g_f  = 4'($urandom % 3);
      for (int e = 0; e < 8; e++) din_s[e] = 8'($urandom);
      din_f[0] = 8'($urandom);
    end
    chk(gated_seen > 0 && hold_seen > 0, "gating and hold both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
