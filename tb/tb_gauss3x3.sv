// tb_gauss3x3: self-checking testbench for gauss3x3 (3x3 Gaussian blur).
// Applies corner operands (all zero, all 255, single maxima) and 2000 random
// operand vectors and compares every result with tb_ref_pkg::ref_kernel, an
// integer model of the kernel's definition. The kernel is combinational, so
// each result is checked one time unit after the operands change.
module tb_gauss3x3;
  import tb_ref_pkg::*;

  logic [9-1:0][7:0] din;
  logic [8-1:0]      dout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  gauss3x3 dut (.din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(uvec9_t x);
    int exp_v;
    for (int e = 0; e < 9; e++) din[e] = 8'(x[e]);
    #1;
    exp_v = ref_kernel(K_GAUSS, x);
    checks++;
    if (int'(dout) != exp_v) begin
      failures++;
      if (failures < 10) $display("mismatch: got %0d expected %0d", dout, exp_v);
    end
  endtask

  initial begin
    uvec9_t x;
    foreach (x[i]) x[i] = 0;
    apply(x);
    foreach (x[i]) x[i] = 255;
    apply(x);
    for (int j = 0; j < 9; j++) begin
      foreach (x[i]) x[i] = 0;
      x[j] = 255;
      apply(x);
      foreach (x[i]) x[i] = 255;
      x[j] = 0;
      apply(x);
    end
    for (int n = 0; n < 2000; n++) begin
      foreach (x[i]) x[i] = (i < 9) ? ($urandom % 256) : 0;
      apply(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
