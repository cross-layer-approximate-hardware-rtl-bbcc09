// tb_clock_gate: self-checking testbench for clock_gate.
// The enable is changed at random, both while the clock is low (where it
// must take effect at the next rising edge) and while the clock is high
// (where it must not shorten or create a pulse). Every clock period the
// testbench counts the rising edges of gclk and checks that there was
// exactly one when the enable was high at the rising edge of clk and none
// otherwise, and that gclk is never high while clk is low.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en_at_edge;
    int n_on = 0, n_off = 0;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      en = 1'($urandom);
      #2;
      checks++;
      if (gclk) begin failures++; $display("gclk high while clk low"); end
      en_at_edge = en;
      pulses = 0;
      @(posedge clk);
      #2;
      en = 1'($urandom);       // change while clk is high: no effect now
      #2;
      checks++;
      if (pulses != (en_at_edge ? 1 : 0)) begin
        failures++;
        $display("cycle %0d: %0d gclk pulses with enable %0b", c, pulses, en_at_edge);
      end
      if (en_at_edge) n_on++; else n_off++;
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
