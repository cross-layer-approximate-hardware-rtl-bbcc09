// tb_out_mux: self-checking testbench for out_mux with three 12-bit inputs.
// Random inputs and every select value, including the unused code 3, which
// must give zero; each output is compared with the input picked by index.
module tb_out_mux;
  localparam int M = 3, W = 12;
  logic [M-1:0][W-1:0] din;
  logic [1:0]          sel;
  logic [W-1:0]        dout;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  out_mux #(.M(M), .W(W)) dut (.din(din), .sel(sel), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v [M];
    logic [W-1:0] exp_v;
    for (int n = 0; n < 1000; n++) begin
      foreach (v[i]) begin v[i] = W'($urandom); din[i] = v[i]; end
      sel = 2'(n % 4);
      #1;
      exp_v = (n % 4 < M) ? v[n % 4] : '0;
      checks++;
      if (dout !== exp_v) begin
        failures++;
        $display("sel %0d: got %h expected %h", sel, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
