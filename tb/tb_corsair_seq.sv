// tb_corsair_seq: checks the sequencer's bus schedule cycle by cycle.
//
// For random parameters (24/32-bit, limits, skip, read/write disables, y from
// b) the expected list of bus cycles is built independently: the start
// cycle, the y loads from Yrp upwards, the A and X prefetch, then per loop
// iteration A read, X read, B write and (32-bit) a silent cycle, with reads
// past their limit and skipped writes left free. The sequencer's request,
// direction, address, y byte index and done pulse are compared with it, as
// are the final pointer values and the idle flag.
module tb_corsair_seq;
  import corsair_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start;
  cfg_t     cfg;
  logic     ptr_ld [4];
  addr_t    ptr_val [4];
  byte_t    bi;
  logic     idle, done;
  mem_req_t mem;
  dp_ctl_t  dp;
  addr_t    ptr_q [4];
  int checks = 0, failures = 0;

  corsair_seq dut (.*);

  typedef struct packed { logic req, we; addr_t addr; logic done; logic ly; logic [1:0] yi; } exp_t;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run(cfg_t c, addr_t p[4]);
    exp_t e [$];
    exp_t t;
    int n, na, nx, nw;
    addr_t a, x, b, y;
    n = c.cmd.mode32 ? 4 : 3;
    a = p[0]; x = p[1]; b = p[2]; y = p[3];
    na = 0; nx = 0; nw = 0;
    e.push_back('0);                               // start cycle
    if (c.cmd.y_from_b) e.push_back('0);
    else for (int j = 0; j < n; j++) begin
      e.push_back('{req: 1, we: 0, addr: y, done: 0, ly: 1, yi: 2'(n - 1 - j)});
      y++;
    end
    for (int k = -1; k < int'(c.cnt); k++) begin
      // A read (prefetch when k = -1)
      t = '0;
      if (c.cmd.rd_a_en && na < int'(c.alim)) begin t.req = 1; t.addr = a; a--; na++; end
      if (k >= 0) begin
        e.push_back(t);
        t = '0;
        if (c.cmd.rd_x_en && nx < int'(c.xlim)) begin t.req = 1; t.addr = x; x--; nx++; end
        e.push_back(t);
        t = '0;
        if (c.cmd.wr_b_en && k >= int'(c.bskip)) begin t.req = 1; t.we = 1; t.addr = b; b--; nw++; end
        e.push_back(t);
        if (n == 4) e.push_back('0);
        if (k == int'(c.cnt) - 1) e[$].done = 1;
      end else begin
        e.push_back(t);
        t = '0;
        if (c.cmd.rd_x_en && nx < int'(c.xlim)) begin t.req = 1; t.addr = x; x--; nx++; end
        if (c.cnt == 0) t.done = 1;
        e.push_back(t);
      end
    end
    // drive
    @(negedge clk);
    check("idle before start", idle, 1);
    start = 1; cfg = c;
    for (int i = 0; i < 4; i++) begin ptr_ld[i] = 1; ptr_val[i] = p[i]; end
    foreach (e[i]) begin
      #1;
      check($sformatf("cycle %0d req", i), mem.req, e[i].req);
      if (e[i].req) begin
        check($sformatf("cycle %0d we", i), mem.we, e[i].we);
        check($sformatf("cycle %0d addr", i), mem.addr, e[i].addr);
      end
      check($sformatf("cycle %0d done", i), done, e[i].done);
      if (e[i].ly) check($sformatf("cycle %0d y index", i), dp.y_idx, e[i].yi);
      @(negedge clk);
      start = 0;
      for (int j = 0; j < 4; j++) ptr_ld[j] = 0;
    end
    check("idle after op", idle, 1);
    check("Arp", ptr_q[0], a);
    check("Xrp", ptr_q[1], x);
    check("Bwp", ptr_q[2], b);
    check("Yrp", ptr_q[3], y);
  endtask

  initial begin
    cfg_t  c;
    addr_t p [4];
    start = 0; cfg = '0; bi = '0;
    for (int i = 0; i < 4; i++) begin ptr_ld[i] = 0; ptr_val[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      c.cnt   = 8'($urandom_range(0, 30));
      c.alim  = 8'($urandom_range(0, 35));
      c.xlim  = 8'($urandom_range(0, 35));
      c.bskip = 3'($urandom_range(0, 4));
      c.cmd   = cmd_t'($urandom);
      c.cmd.rd_a_en = c.cmd.rd_a_en | 1'($urandom);
      c.cmd.rd_x_en = c.cmd.rd_x_en | 1'($urandom);
      c.cmd.wr_b_en = c.cmd.wr_b_en | 1'($urandom);
      for (int i = 0; i < 4; i++) p[i] = 8'($urandom);
      run(c, p);
      repeat ($urandom_range(0, 2)) @(negedge clk);
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
