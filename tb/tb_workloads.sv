// tb_workloads: the default Sobel block under the three accuracy mixes it was
// designed for, plus one run with idle cycles.
// Mixes (share of operations at 100/98/96/90 % accuracy):
//   W_ex "mostly exact"        0.50 0.20 0.20 0.10
//   W_eq "even"                0.25 0.25 0.25 0.25
//   W_ax "mostly approximate"  0.10 0.15 0.05 0.70
// For each mix, N_OPS operations with exactly these shares, in random order,
// slide a 3x3 window over a smooth synthetic test image. Every result is
// checked against tb_ref_pkg::acc_model. The enables of the two
// instantiations are observed inside the block and must add up to the
// shares the circuit set implies (exact circuit: 100 % + 98 %; 96 % circuit:
// 96 % + 90 %). The run also reports, per accuracy level, the measured
// accuracy 1 - mean(|approx - exact| / exact) over results with a non-zero
// exact value, and the PSNR of the results against the exact ones.
// A fourth run uses the even mix at 10 % hardware utilisation
// (nine idle cycles in ten) and checks that no instantiation is clocked in
// an idle cycle.
module tb_workloads;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_OPS = 2000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge starts the asynchronous reset
  acc_idx_t acc_req, oacc;
  logic vin, ov;
  logic [7:0][7:0] din;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  int en_cnt [2];
  int en_idle;
  acc_model m;   // one model for all runs: the block keeps its state between them

  acc_config_block #(.KERNEL(K_SOBEL)) dut (
    .clk(clk), .rst_n(rst_n), .acc_req(acc_req), .in_valid(vin), .din(din),
    .dout(dout), .dout_valid(ov), .dout_acc(oacc), .inst_dout(), .dout_sel());

  always #5 clk = ~clk;

  // observe which instantiation is clocked in each cycle
  always @(posedge clk) begin
    if (dut.inst_en[0]) en_cnt[0]++;
    if (dut.inst_en[1]) en_cnt[1]++;
    if (!vin && dut.inst_en != 2'b00) en_idle++;
  end

  initial begin : watchdog
    repeat (4 * 10 * N_OPS + 1000) @(posedge clk);
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

  function automatic int pixel(int x, int y);
    int v = (x * 3 + y) / 3 + (((x - 40) * (x - 40) + (y - 50) * (y - 50) < 700) ? 80 : 0)
            + int'($urandom % 7) - 3;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic run(string name, int u [4], int idle_per_op);
    int seq [N_OPS];
    int er [N_OPS], ex [N_OPS];
    int n = 0, t, j, px = 0, py = 0, idx, cyc, op;
    int pend_cyc [$], pend_idx [$];
    real rel [4], sqe [4];
    int  nres [4];
    int  cnt [4];
    uvec9_t d, dex;
    acc_model mex = new(K_SOBEL, 4'b0001);   // exact reference, never gated
    for (int a = 0; a < 4; a++) begin
      for (int i = 0; i < u[a] * N_OPS / 100; i++) begin seq[n] = a; n++; end
      rel[a] = 0.0; cnt[a] = 0; sqe[a] = 0.0; nres[a] = 0;
    end
    for (int i = N_OPS - 1; i > 0; i--) begin
      j = $urandom % (i + 1);
      t = seq[i]; seq[i] = seq[j]; seq[j] = t;
    end
    en_cnt = '{0, 0}; en_idle = 0;
    // one cycle to register the first request
    @(negedge clk);
    vin = 1'b0; acc_req = 2'(seq[0]);
    op = 0; cyc = 0;
    while (op < N_OPS || pend_cyc.size() > 0) begin
      @(negedge clk);
      // results of operations sampled two negedges ago
      if (pend_cyc.size() > 0 && pend_cyc[0] == cyc - 2) begin
        int q;
        void'(pend_cyc.pop_front());
        q = pend_idx.pop_front();
        chk(ov && int'(dout) == er[q] && int'(oacc) == seq[q], {name, " result"});
        sqe[seq[q]] += real'((er[q] - ex[q]) * (er[q] - ex[q]));
        nres[seq[q]]++;
        if (ex[q] != 0) begin
          rel[seq[q]] += ((er[q] > ex[q]) ? real'(er[q] - ex[q]) : real'(ex[q] - er[q])) / real'(ex[q]);
          cnt[seq[q]]++;
        end
      end else chk(!ov, {name, " no result without an operation"});
      if (op < N_OPS && (cyc % (idle_per_op + 1)) == 0) begin
        idx = 0;
        for (int r = 0; r < 3; r++)
          for (int q = 0; q < 3; q++)
            if (!(r == 1 && q == 1)) begin d[idx] = pixel(px + q, py + r); idx++; end
        d[8] = 0;
        er[op] = m.step(seq[op], d);
        ex[op] = mex.step(0, d);
        for (int e = 0; e < 8; e++) din[e] = 8'(d[e]);
        vin = 1'b1;
        pend_cyc.push_back(cyc);
        pend_idx.push_back(op);
        op++;
        px = (px + 1) % 100;
        if (px == 0) py = (py + 1) % 100;
      end else vin = 1'b0;
      acc_req = 2'((op < N_OPS) ? seq[op] : 0);
      cyc++;
    end
    chk(en_cnt[0] == (u[0] + u[1]) * N_OPS / 100, {name, " exact instantiation utilisation"});
    chk(en_cnt[1] == (u[2] + u[3]) * N_OPS / 100, {name, " 96% instantiation utilisation"});
    chk(en_idle == 0, {name, " nothing clocked in idle cycles"});
    $display("%s: exact circuit %0d ops, 96%% circuit %0d ops, hardware utilisation %0d%%",
             name, en_cnt[0], en_cnt[1], 100 / (idle_per_op + 1));
    for (int a = 0; a < 4; a++)
      if (cnt[a] > 0)
        $display("  level %0d%%: 1-MRED %0.2f%% over %0d results, PSNR %0.1f dB",
                 ACC_PCT[a], 100.0 * (1.0 - rel[a] / cnt[a]), cnt[a],
                 (sqe[a] == 0.0) ? 99.9 : 10.0 * $log10(255.0 * 255.0 * nres[a] / sqe[a]));
  endtask

  initial begin
    vin = 1'b0; acc_req = '0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m = new(K_SOBEL, 4'b0101);
    run("W_ex", '{50, 20, 20, 10}, 0);
    run("W_eq", '{25, 25, 25, 25}, 0);
    run("W_ax", '{10, 15, 5, 70}, 0);
    run("W_eq at U_total=0.1", '{25, 25, 25, 25}, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
