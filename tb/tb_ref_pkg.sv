// tb_ref_pkg: reference models used by the testbenches.
// ref_kernel() computes each kernel's exact result from integer operands with
// plain integer arithmetic, written from the kernel definitions (3x3 window
// convolutions, tap sums, dot product, squared distance), not from the RTL.
// acc_model predicts a whole accuracy-configurable block: for every
// instantiation it keeps the operand register contents, applies precision
// scaling (discarded LSBs read as 0) and LSB clock gating (gated bits keep
// their old value), and returns the result the block must produce.
package tb_ref_pkg;

  typedef int unsigned uvec9_t [9];

  localparam int K_SOBEL = 0, K_GAUSS = 1, K_FIR = 2, K_NEURON = 3, K_EUCLID = 4;

  function automatic int n_elem(int k);
    case (k)
      K_SOBEL: return 8;  K_GAUSS: return 9;  K_FIR: return 4;
      K_NEURON: return 8; default: return 4;
    endcase
  endfunction

  function automatic int sat(int v, int maxv);
    return (v > maxv) ? maxv : v;
  endfunction

  function automatic int ref_kernel(int k, uvec9_t x);
    int win [3][3];
    int gx, gy, s;
    int sk_x [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int sk_y [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    int gk   [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    int fir_c [4]   = '{32, 96, 96, 32};
    int nw [8]      = '{3, -2, 5, 1, -4, 2, 6, -1};
    case (k)
      K_SOBEL: begin
        // 8 neighbours in raster order, centre left out
        int idx = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            if (r == 1 && c == 1) win[r][c] = 0;
            else begin win[r][c] = int'(x[idx]); idx++; end
        gx = 0; gy = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            gx += sk_x[r][c] * win[r][c];
            gy += sk_y[r][c] * win[r][c];
          end
        return sat((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy), 255);
      end
      K_GAUSS: begin
        s = 0;
        for (int i = 0; i < 9; i++) s += gk[i / 3][i % 3] * int'(x[i]);
        return s / 16;
      end
      K_FIR: begin
        s = 0;
        for (int i = 0; i < 4; i++) s += fir_c[i] * int'(x[i]);
        return sat(s, 65535);
      end
      K_NEURON: begin
        s = -64;
        for (int i = 0; i < 8; i++) s += nw[i] * int'(x[i]);
        if (s < 0) return 0;
        return sat(s / 16, 255);
      end
      default: begin
        gx = int'(x[0]) - int'(x[2]);
        gy = int'(x[1]) - int'(x[3]);
        return sat(gx * gx + gy * gy, 65535);
      end
    endcase
  endfunction

  // Model of one acc_config_block.
  class acc_model;
    int kern;
    bit [3:0] mask;
    int drop [4] = '{0, 1, 2, 3};
    int unsigned regs [4][9];   // operand registers per accuracy level
    int last_serv = -1;
    // statistics
    int switches, gated_ops, ops;
    int level_uses [4];
    int inst_uses [4];

    function new(int k, bit [3:0] m);
      kern = k; mask = m;
      foreach (regs[i, j]) regs[i][j] = 0;
      switches = 0; gated_ops = 0; ops = 0;
      foreach (level_uses[i]) begin level_uses[i] = 0; inst_uses[i] = 0; end
    endfunction

    function int serving(int acc);
      for (int s = acc; s >= 0; s--) if (mask[s]) return s;
      return 0;
    endfunction

    function int gating(int acc);
      return drop[acc] - drop[serving(acc)];
    endfunction

    // One accepted operation at accuracy level acc; din holds the operands
    // presented (for the FIR only din[0], the new sample).
    function int step(int acc, uvec9_t din);
      int s = serving(acc);
      int g = gating(acc);
      int ne = n_elem(kern);
      int unsigned keep_mask = ((32'hFF >> (drop[s] + g)) << (drop[s] + g)) & 32'hFF;
      int unsigned nw [9];
      uvec9_t opnd;
      if (kern == K_FIR) begin
        nw[0] = din[0];
        for (int e = 1; e < 4; e++) nw[e] = regs[s][e-1];
      end else begin
        for (int e = 0; e < ne; e++) nw[e] = din[e];
      end
      for (int e = 0; e < ne; e++)
        regs[s][e] = (regs[s][e] & ~keep_mask & 32'hFF) | (nw[e] & keep_mask);
      for (int e = 0; e < 9; e++) opnd[e] = (e < ne) ? regs[s][e] : 0;
      ops++;
      level_uses[acc]++;
      inst_uses[s]++;
      if (g > 0) gated_ops++;
      if (last_serv >= 0 && last_serv != s) switches++;
      last_serv = s;
      return ref_kernel(kern, opnd);
    endfunction
  endclass

endpackage
