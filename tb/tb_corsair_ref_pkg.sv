// tb_corsair_ref_pkg: reference model of one cell operation, for testbenches.
//
// Works on a copy of the 256-byte RAM and computes, independently of the
// RTL's latch schedule, what an operation must leave behind: the result
// bytes r[k] of y*X + A (or A xor X) by plain schoolbook multiplication with
// integer carries, the bytes written to B, the captured bytes b[3:0], the
// final pointers and the number of busy cycles.
package tb_corsair_ref_pkg;
  import corsair_pkg::*;

  typedef struct packed {
    addr_t arp, xrp, bwp, yrp;
    cfg_t  cfg;
  } op_t;

  // Build a command byte as the CPU writes it (start bit set).
  function automatic byte_t cmd_byte(cmd_t c);
    byte_t v;
    v = '0;
    v[C_START]    = 1'b1;
    v[C_MODE32]   = c.mode32;
    v[C_RD_A]     = c.rd_a_en;
    v[C_RD_X]     = c.rd_x_en;
    v[C_WR_B]     = c.wr_b_en;
    v[C_XOR]      = c.xor_mode;
    v[C_Y_FROM_B] = c.y_from_b;
    return v;
  endfunction

  // Apply one operation to mem / b / ptr; returns the busy cycle count.
  function automatic int ref_run(ref byte_t mem[256], input op_t op,
                                 ref logic [31:0] b, ref addr_t ptr[4]);
    int n, cnt, na, nx, nw, cyc;
    int y[4];
    int a[], x[], acc[];
    byte_t r[];
    n   = op.cfg.cmd.mode32 ? 4 : 3;
    cnt = int'(op.cfg.cnt);
    for (int j = 0; j < 4; j++) y[j] = 0;
    if (op.cfg.cmd.y_from_b) begin
      for (int j = 0; j < n; j++) y[j] = int'(b[8*j +: 8]);
      ptr[3] = op.yrp;
    end else begin
      for (int j = 0; j < n; j++) y[n-1-j] = int'(mem[8'(op.yrp + 8'(j))]);
      ptr[3] = 8'(op.yrp + 8'(n));
    end
    // operand bytes, least significant first; reads stop at the limits
    a = new[cnt + 1];
    x = new[cnt + 1];
    na = op.cfg.cmd.rd_a_en ? ((int'(op.cfg.alim) < cnt + 1) ? int'(op.cfg.alim) : cnt + 1) : 0;
    nx = op.cfg.cmd.rd_x_en ? ((int'(op.cfg.xlim) < cnt + 1) ? int'(op.cfg.xlim) : cnt + 1) : 0;
    for (int k = 0; k <= cnt; k++) begin
      a[k] = (k < na) ? int'(mem[8'(op.arp - 8'(k))]) : 0;
      x[k] = (k < nx) ? int'(mem[8'(op.xrp - 8'(k))]) : 0;
    end
    r = new[cnt];
    if (op.cfg.cmd.xor_mode) begin
      for (int k = 0; k < cnt; k++) r[k] = 8'(a[k] ^ x[k]);
    end else begin
      acc = new[cnt + 1];
      for (int k = 0; k <= cnt; k++) acc[k] = 0;
      for (int k = 0; k < cnt; k++) begin
        acc[k] += a[k];
        for (int j = 0; j < n; j++)
          if (k + j <= cnt) acc[k + j] += x[k] * y[j];
      end
      for (int k = 0; k < cnt; k++) begin
        acc[k + 1] += acc[k] >> 8;
        r[k] = 8'(acc[k]);
      end
    end
    // writes, after the skipped bytes
    nw = 0;
    if (op.cfg.cmd.wr_b_en)
      for (int k = int'(op.cfg.bskip); k < cnt; k++) begin
        mem[8'(op.bwp - 8'(nw))] = r[k];
        nw++;
      end
    // capture of the first four result bytes
    b = '0;
    for (int k = 0; k < cnt && k < 4; k++) b = {r[k], b[31:8]};
    ptr[0] = 8'(op.arp - 8'(na));
    ptr[1] = 8'(op.xrp - 8'(nx));
    ptr[2] = 8'(op.bwp - 8'(nw));
    cyc = (op.cfg.cmd.y_from_b ? 1 : n) + 2 + cnt * n;
    return cyc;
  endfunction
endpackage
