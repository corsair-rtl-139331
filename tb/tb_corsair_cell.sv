// tb_corsair_cell: random operations on the cell against the reference model.
//
// A behavioural 256-byte memory with asynchronous read is attached to the
// cell's RAM bus. Each operation is programmed through the register port with
// random pointers, count, limits, skip and command bits (24/32-bit, A/X read
// disables, write disable, XOR, y from b), then the memory image, the
// captured bytes b[0..3], the live pointers and the number of busy cycles are
// compared with tb_corsair_ref_pkg. Some operations are queued while the
// previous one is still running (double-buffered registers).
module tb_corsair_cell;
  import corsair_pkg::*;
  import tb_corsair_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       sfr_we;
  logic [3:0] sfr_addr;
  byte_t      sfr_wdata, sfr_rdata;
  mem_req_t   mem;
  byte_t      mem_rdata;
  logic       busy, done;

  corsair_cell dut (.*);

  byte_t tmem [256];
  byte_t model [256];
  always_comb mem_rdata = tmem[mem.addr];
  always_ff @(posedge clk) if (mem.req && mem.we) tmem[mem.addr] <= mem.wdata;

  int checks = 0, failures = 0;
  int fail_seen = 0;
  op_t last_op;
  int busy_cycles = 0;
  always_ff @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic sfr_write(logic [3:0] a, byte_t d);
    @(negedge clk);
    sfr_we = 1; sfr_addr = a; sfr_wdata = d;
    @(negedge clk);
    sfr_we = 0;
  endtask

  task automatic sfr_read(logic [3:0] a, output byte_t d);
    @(negedge clk);
    sfr_addr = a;
    #1 d = sfr_rdata;
  endtask

  task automatic program_op(op_t op);
    sfr_write(R_ARP, op.arp);
    sfr_write(R_XRP, op.xrp);
    sfr_write(R_BWP, op.bwp);
    sfr_write(R_YRP, op.yrp);
    sfr_write(R_CNT, op.cfg.cnt);
    sfr_write(R_ALIM, op.cfg.alim);
    sfr_write(R_XLIM, op.cfg.xlim);
    sfr_write(R_BSKIP, 8'(op.cfg.bskip));
    sfr_write(R_CMD, cmd_byte(op.cfg.cmd));
  endtask

  task automatic wait_idle();
    byte_t st;
    do sfr_read(R_STATUS, st); while (st[1:0] != 2'b00);
  endtask

  // Random op in fixed regions: A 0..79, X 80..159, B 160..239, Y 240..255.
  function automatic op_t rand_op(logic allow_yb);
    op_t op;
    op.cfg.cnt   = 8'($urandom_range(0, 72));
    op.arp       = 8'($urandom_range(72, 79));
    op.xrp       = 8'($urandom_range(152, 159));
    op.bwp       = 8'($urandom_range(232, 239));
    op.yrp       = 8'($urandom_range(240, 252));
    op.cfg.alim  = 8'($urandom_range(0, 72));
    op.cfg.xlim  = 8'($urandom_range(0, 72));
    op.cfg.bskip = 3'($urandom_range(0, 4));
    op.cfg.cmd.mode32   = 1'($urandom);
    op.cfg.cmd.rd_a_en  = ($urandom_range(0, 7) != 0);
    op.cfg.cmd.rd_x_en  = ($urandom_range(0, 7) != 0);
    op.cfg.cmd.wr_b_en  = ($urandom_range(0, 7) != 0);
    op.cfg.cmd.xor_mode = ($urandom_range(0, 7) == 0);
    op.cfg.cmd.y_from_b = allow_yb && ($urandom_range(0, 3) == 0);
    return op;
  endfunction

  task automatic compare_all(string tag, logic [31:0] b_exp, addr_t p_exp[4], int cyc_exp, int cyc_got);
    byte_t d;
    int bad = 0;
    for (int i = 0; i < 256; i++) if (tmem[i] !== model[i]) begin
      bad++;
      if (bad < 4) $display("  %s mem[%0d] got %0h exp %0h", tag, i, tmem[i], model[i]);
    end
    check({tag, " memory"}, bad, 0);
    for (int i = 0; i < 4; i++) begin
      sfr_read(4'(R_B0 + 4'(i)), d);
      check({tag, " b capture"}, d, b_exp[8*i +: 8]);
      sfr_read(4'(i), d);
      check({tag, " pointer"}, d, p_exp[i]);
    end
    check({tag, " busy cycles"}, cyc_got, cyc_exp);
    if (failures != fail_seen) $display("  %s op cnt=%0d alim=%0d xlim=%0d skip=%0d m32=%b ra=%b rx=%b wb=%b xor=%b yb=%b", tag, last_op.cfg.cnt, last_op.cfg.alim, last_op.cfg.xlim, last_op.cfg.bskip, last_op.cfg.cmd.mode32, last_op.cfg.cmd.rd_a_en, last_op.cfg.cmd.rd_x_en, last_op.cfg.cmd.wr_b_en, last_op.cfg.cmd.xor_mode, last_op.cfg.cmd.y_from_b);
    fail_seen = failures;
  endtask

  logic [31:0] b_model;
  addr_t       p_model [4];

  initial begin
    op_t op, op2;
    int cyc, cyc2, c0;
    sfr_we = 0; sfr_addr = '0; sfr_wdata = '0;
    for (int i = 0; i < 256; i++) begin
      tmem[i] = 8'($urandom);
      model[i] = tmem[i];
    end
    b_model = '0;
    for (int i = 0; i < 4; i++) p_model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // known case: 0x0102 * 0x030201 (24-bit) + 0x05 -> 0x0305_0906 ... checked by the model
    for (int t = 0; t < 120; t++) begin
      op = rand_op(t > 0);
      c0 = busy_cycles;
      program_op(op);
      cyc = ref_run(model, op, b_model, p_model);
      last_op = op;
      wait_idle();
      compare_all($sformatf("op%0d", t), b_model, p_model, cyc, busy_cycles - c0);
      // occasionally refresh operand regions with new data
      if (t % 10 == 9) for (int i = 0; i < 240; i++) begin
        tmem[i] = 8'($urandom);
        model[i] = tmem[i];
      end
    end

    // back-to-back: the second operation is loaded while the first runs
    for (int t = 0; t < 20; t++) begin
      op = rand_op(1'b0);
      op.cfg.cnt = 8'($urandom_range(20, 60));
      op2 = rand_op(1'b1);
      c0 = busy_cycles;
      program_op(op);
      program_op(op2);   // written while op runs (pending until op finishes)
      begin
        byte_t st;
        sfr_read(R_STATUS, st);
        check("second op pending while first busy", st[1:0], 2'b11);
      end
      cyc  = ref_run(model, op, b_model, p_model);
      cyc2 = ref_run(model, op2, b_model, p_model);
      wait_idle();
      compare_all($sformatf("pair%0d", t), b_model, p_model, cyc + cyc2, busy_cycles - c0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
