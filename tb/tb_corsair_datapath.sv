// tb_corsair_datapath: drives the datapath control word cycle by cycle as the
// sequencer would (y load, prefetch, N-phase loop) with random X, A and y, and
// compares every emitted result byte bi with schoolbook multiplication
// y*X + A. Also covers 32-bit mode, XOR mode, the capture of the first four
// result bytes and reuse of those bytes as y.
module tb_corsair_datapath;
  import corsair_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dp_ctl_t     ctl;
  logic        mode32, xor_mode;
  byte_t       rdata, bi;
  logic [31:0] b_cap;
  int checks = 0, failures = 0;

  corsair_datapath dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic cyc(dp_ctl_t c, byte_t d);
    ctl = c; rdata = d;
    @(negedge clk);
  endtask

  // one operation of cnt result bytes; y_b selects reuse of b_cap as y
  task automatic run_op(int cnt, logic m32, logic xm, logic y_b, int yv[4]);
    int n, acc[];
    byte_t a[], x[], r[];
    dp_ctl_t c;
    logic [31:0] b_prev;
    n = m32 ? 4 : 3;
    mode32 = m32; xor_mode = xm;
    a = new[cnt + 1]; x = new[cnt + 1]; r = new[cnt]; acc = new[cnt + n + 1];
    for (int k = 0; k <= cnt; k++) begin a[k] = 8'($urandom); x[k] = 8'($urandom); end
    b_prev = b_cap;
    if (y_b) for (int j = 0; j < 4; j++) yv[j] = int'(b_prev[8*j +: 8]);
    // reference
    for (int k = 0; k < cnt + n + 1; k++) acc[k] = 0;
    for (int k = 0; k < cnt; k++) begin
      acc[k] += int'(a[k]);
      for (int j = 0; j < n; j++) acc[k + j] += int'(x[k]) * yv[j];
    end
    for (int k = 0; k < cnt; k++) begin
      acc[k + 1] += acc[k] >> 8;
      r[k] = xm ? (a[k] ^ x[k]) : 8'(acc[k]);
    end
    // start, y load, prefetch
    c = '0; c.clr = 1; cyc(c, 8'h00);
    if (y_b) begin
      c = '0; c.ld_y_b = 1; cyc(c, 8'h00);
    end else begin
      for (int j = n - 1; j >= 0; j--) begin
        c = '0; c.ld_y = 1; c.use_mem = 1; c.y_idx = 2'(j); cyc(c, 8'(yv[j]));
      end
    end
    c = '0; c.clr_b = 1; c.ld_ai = 1; c.use_mem = 1; cyc(c, a[0]);
    c = '0; c.ld_xi = 1; c.use_mem = 1; cyc(c, x[0]);
    for (int k = 0; k < cnt; k++) begin
      for (int p = 0; p < n; p++) begin
        c = '0;
        c.mac_en = 1; c.phase = 2'(p); c.last_phase = (p == n - 1);
        c.cap_b = (p == 0) && (k < 4);
        if (p == 0) begin c.ld_ait = 1; c.use_mem = 1; end
        if (p == 1) begin c.ld_xit = 1; c.use_mem = 1; end
        cyc(c, (p == 0) ? a[k + 1] : (p == 1) ? x[k + 1] : 8'h00);
        if (p == 0) check($sformatf("bi[%0d] n=%0d xor=%0b yb=%0b", k, n, xm, y_b), bi, r[k]);
      end
    end
    ctl = '0;
    if (cnt >= 4) check("b capture", b_cap, {r[3], r[2], r[1], r[0]});
  endtask

  initial begin
    int yv[4];
    ctl = '0; mode32 = 0; xor_mode = 0; rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // all-ones operands: the largest carries the latches ever hold
    begin
      yv = '{255, 255, 255, 255};
      run_op(10, 1'b0, 1'b0, 1'b0, yv);
      run_op(10, 1'b1, 1'b0, 1'b0, yv);
    end
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 4; j++) yv[j] = int'($urandom_range(0, 255));
      run_op($urandom_range(4, 40), 1'($urandom), ($urandom_range(0, 5) == 0),
             (t > 0) && ($urandom_range(0, 3) == 0), yv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
