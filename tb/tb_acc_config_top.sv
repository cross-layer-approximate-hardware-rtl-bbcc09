// tb_acc_config_top: end-to-end testbench of acc_config_top at its default
// parameters (all five accuracy-configurable kernels, default circuit set).
// Every block gets an independent random stream of operations: an accuracy
// request one cycle ahead, then operands or an idle cycle. The image kernels
// get pixel windows from a smooth synthetic image with noise (neighbouring
// pixels similar), the others uniform random operands. Each result is
// compared with tb_ref_pkg::acc_model and must arrive exactly one edge after
// its operands were sampled, both on the multiplexed port and in the copy
// register named by dout_sel. The testbench also counts, per block, how often
// each mechanism of the architecture occurred - every accuracy level, a
// switch between instantiations, an operation on a clock-gated
// instantiation, an accuracy change between back-to-back operations, and an
// idle cycle with every instantiation frozen - and counts a failure for any
// that never happened.
module tb_acc_config_top;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_OPS = 3000;
  localparam int NK = 5;
  // kernel of each block in port order
  localparam int KID [NK] = '{K_SOBEL, K_GAUSS, K_FIR, K_NEURON, K_EUCLID};
  localparam string KNAME [NK] = '{"sobel", "gauss", "fir", "neuron", "euclid"};

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge starts the asynchronous reset
  acc_idx_t acc [NK];
  logic     vin [NK];
  acc_idx_t oacc [NK];
  logic     ov [NK];
  int       dout [NK];
  uvec9_t   opnd [NK];

  logic [7:0][7:0] sobel_din, neuron_din;
  logic [8:0][7:0] gauss_din;
  logic [0:0][7:0] fir_din;
  logic [3:0][7:0] euclid_din;
  logic [7:0]  sobel_dout, gauss_dout, neuron_dout;
  logic [15:0] fir_dout, euclid_dout;
  logic [1:0][7:0]  sobel_idout, gauss_idout, neuron_idout;
  logic [1:0][15:0] fir_idout, euclid_idout;
  logic             dsel [NK];
  int               mmio [NK];

  int checks = 0, failures = 0;

  acc_config_top dut (
    .clk(clk), .rst_n(rst_n),
    .sobel_acc_req(acc[0]), .sobel_in_valid(vin[0]), .sobel_din(sobel_din),
    .sobel_dout(sobel_dout), .sobel_dout_valid(ov[0]), .sobel_dout_acc(oacc[0]),
    .sobel_inst_dout(sobel_idout), .sobel_dout_sel(dsel[0]),
    .gauss_acc_req(acc[1]), .gauss_in_valid(vin[1]), .gauss_din(gauss_din),
    .gauss_dout(gauss_dout), .gauss_dout_valid(ov[1]), .gauss_dout_acc(oacc[1]),
    .gauss_inst_dout(gauss_idout), .gauss_dout_sel(dsel[1]),
    .fir_acc_req(acc[2]), .fir_in_valid(vin[2]), .fir_din(fir_din),
    .fir_dout(fir_dout), .fir_dout_valid(ov[2]), .fir_dout_acc(oacc[2]),
    .fir_inst_dout(fir_idout), .fir_dout_sel(dsel[2]),
    .neuron_acc_req(acc[3]), .neuron_in_valid(vin[3]), .neuron_din(neuron_din),
    .neuron_dout(neuron_dout), .neuron_dout_valid(ov[3]), .neuron_dout_acc(oacc[3]),
    .neuron_inst_dout(neuron_idout), .neuron_dout_sel(dsel[3]),
    .euclid_acc_req(acc[4]), .euclid_in_valid(vin[4]), .euclid_din(euclid_din),
    .euclid_dout(euclid_dout), .euclid_dout_valid(ov[4]), .euclid_dout_acc(oacc[4]),
    .euclid_inst_dout(euclid_idout), .euclid_dout_sel(dsel[4]));

  always_comb begin
    for (int e = 0; e < 8; e++) sobel_din[e]  = 8'(opnd[0][e]);
    for (int e = 0; e < 9; e++) gauss_din[e]  = 8'(opnd[1][e]);
    fir_din[0] = 8'(opnd[2][0]);
    for (int e = 0; e < 8; e++) neuron_din[e] = 8'(opnd[3][e]);
    for (int e = 0; e < 4; e++) euclid_din[e] = 8'(opnd[4][e]);
    mmio = '{int'(sobel_idout[dsel[0]]), int'(gauss_idout[dsel[1]]), int'(fir_idout[dsel[2]]),
             int'(neuron_idout[dsel[3]]), int'(euclid_idout[dsel[4]])};
    dout = '{int'(sobel_dout), int'(gauss_dout), int'(fir_dout), int'(neuron_dout),
             int'(euclid_dout)};
  end

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

  // smooth synthetic image: a diagonal ramp plus a bright disc plus noise
  function automatic int pixel(int x, int y);
    int v = (x + y) / 4 + (((x - 64) * (x - 64) + (y - 64) * (y - 64) < 900) ? 90 : 0)
            + int'($urandom % 9) - 4;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    acc_model m [NK];
    int ev [NK][N_OPS], ea [NK][N_OPS], er [NK][N_OPS];
    int nxt [NK], last_acc [NK], last_valid [NK];
    int idle [NK], changes [NK];
    int px, py, idx;
    uvec9_t d;
    for (int k = 0; k < NK; k++) begin
      m[k] = new(KID[k], 4'b0101);
      acc[k] = '0; vin[k] = 1'b0; idle[k] = 0; changes[k] = 0;
      last_acc[k] = -1; last_valid[k] = 0;
      foreach (opnd[k][i]) opnd[k][i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NK; k++) begin nxt[k] = $urandom % 4; acc[k] = 2'(nxt[k]); end
    px = 0; py = 0;
    for (int c = 0; c < N_OPS; c++) begin
      @(negedge clk);
      for (int k = 0; k < NK; k++) begin
        if (c >= 2) begin
          chk(ov[k] == 1'(ev[k][c-2]), {KNAME[k], " valid timing"});
          if (ev[k][c-2] != 0)
          begin
            chk(dout[k] == er[k][c-2] && int'(oacc[k]) == ea[k][c-2], {KNAME[k], " result"});
            chk(mmio[k] == er[k][c-2] && int'(dsel[k]) == ((m[k].serving(ea[k][c-2]) == 2) ? 1 : 0),
                {KNAME[k], " memory-mapped result"});
          end
        end
        // operation c
        ev[k][c] = ($urandom % 6 != 0);
        ea[k][c] = nxt[k];
        if (KID[k] == K_SOBEL || KID[k] == K_GAUSS) begin
          idx = 0;
          for (int r = 0; r < 3; r++)
            for (int q = 0; q < 3; q++)
              if (!(KID[k] == K_SOBEL && r == 1 && q == 1)) begin
                d[idx] = pixel(px + q, py + r);
                idx++;
              end
          if (KID[k] == K_SOBEL) d[8] = 0;
        end else begin
          foreach (d[i]) d[i] = $urandom % 256;
        end
        opnd[k] = d;
        if (ev[k][c] != 0) begin
          er[k][c] = m[k].step(nxt[k], d);
          if (last_valid[k] != 0 && last_acc[k] != nxt[k]) changes[k]++;
          last_acc[k] = nxt[k];
        end else idle[k]++;
        last_valid[k] = ev[k][c];
        vin[k] = 1'(ev[k][c]);
        if ($urandom % 4 == 0) nxt[k] = $urandom % 4;
        acc[k] = 2'(nxt[k]);
      end
      px = (px + 1) % 125;
      if (px == 0) py = (py + 1) % 125;
    end
    for (int k = 0; k < NK; k++) begin
      $display("%s: ops=%0d levels(100/98/96/90)=%0d/%0d/%0d/%0d switches=%0d gated=%0d back-to-back changes=%0d idle=%0d",
               KNAME[k], m[k].ops, m[k].level_uses[0], m[k].level_uses[1], m[k].level_uses[2],
               m[k].level_uses[3], m[k].switches, m[k].gated_ops, changes[k], idle[k]);
      for (int a = 0; a < 4; a++) chk(m[k].level_uses[a] > 0, {KNAME[k], " accuracy level used"});
      chk(m[k].switches > 0, {KNAME[k], " instantiation switch"});
      chk(m[k].gated_ops > 0, {KNAME[k], " gated operation"});
      chk(changes[k] > 0, {KNAME[k], " back-to-back accuracy change"});
      chk(idle[k] > 0, {KNAME[k], " idle cycle"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
