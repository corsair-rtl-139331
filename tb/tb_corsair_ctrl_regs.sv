// tb_corsair_ctrl_regs: checks the double-buffered control registers.
//
// A register set written while the sequencer is busy must not reach the
// active copy; start must wait for the sequencer to be idle, last one cycle,
// carry exactly the registers written since the previous start (pointer load
// flags, count, limits, skip, command), and leave the others unchanged. Also
// checks status bits, the done flag, the clamp of the skip count to 4 and the
// read-back of live pointers and captured bytes.
module tb_corsair_ctrl_regs;
  import corsair_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sfr_we;
  logic [3:0]  sfr_addr;
  byte_t       sfr_wdata, sfr_rdata;
  logic        seq_idle, seq_done;
  addr_t       ptr_q [4];
  logic [31:0] b_cap;
  logic        start;
  cfg_t        cfg;
  logic        ptr_ld [4];
  addr_t       ptr_val [4];
  int checks = 0, failures = 0;

  corsair_ctrl_regs dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(logic [3:0] a, byte_t d);
    sfr_we = 1; sfr_addr = a; sfr_wdata = d;
    @(negedge clk);
    sfr_we = 0;
  endtask

  task automatic chk_rd(string what, logic [3:0] a, longint exp);
    sfr_addr = a;
    #1;
    check(what, sfr_rdata, exp);
  endtask

  initial begin
    byte_t v [9];
    cfg_t  cfg_before;
    sfr_we = 0; sfr_addr = '0; sfr_wdata = '0;
    seq_idle = 0; seq_done = 0; b_cap = 32'h44332211;
    for (int i = 0; i < 4; i++) ptr_q[i] = 8'(8'h10 * (i + 1));
    repeat (2) @(negedge clk);
    rst_n = 1;

    // full register set written while busy
    for (int i = 0; i < 8; i++) v[i] = 8'($urandom);
    v[R_BSKIP] = 8'd3;
    v[R_CMD]   = 8'b0101_0111;   // start, mode32, rd_a, wr_b, y_from_b
    cfg_before = cfg;
    for (int i = 0; i < 9; i++) begin
      wr(4'(i), v[i]);
      check("no start while busy", start, 0);
    end
    check("active copy untouched while busy", cfg, cfg_before);
    chk_rd("status pending+busy", R_STATUS, 8'b011);
    repeat (3) @(negedge clk);
    check("still waiting", start, 0);
    // the sequencer finishes: start in the first idle cycle
    seq_done = 1; @(negedge clk); seq_done = 0;
    chk_rd("done flag", R_STATUS, 8'b111);
    seq_idle = 1;
    #1;
    check("start when idle", start, 1);
    for (int i = 0; i < 4; i++) begin
      check("pointer load flag", ptr_ld[i], 1);
      check("pointer value", ptr_val[i], v[i]);
    end
    @(negedge clk);
    check("start lasts one cycle", start, 0);
    check("cnt", cfg.cnt, v[R_CNT]);
    check("alim", cfg.alim, v[R_ALIM]);
    check("xlim", cfg.xlim, v[R_XLIM]);
    check("bskip", cfg.bskip, 3);
    check("cmd", cfg.cmd, 6'b101011);
    chk_rd("status after start", R_STATUS, 8'b000);
    chk_rd("read back cmd", R_CMD, 8'b0101_0110);
    chk_rd("read back cnt", R_CNT, v[R_CNT]);
    for (int i = 0; i < 4; i++) begin
      chk_rd("read live pointer", 4'(i), ptr_q[i]);
      chk_rd("read b capture", 4'(R_B0 + i), b_cap[8*i +: 8]);
    end

    // second operation rewrites only Bwp, the skip (out of range) and cmd
    seq_idle = 0;
    wr(R_BWP, 8'hA5);
    wr(R_BSKIP, 8'd7);
    wr(R_CMD, 8'b0011_1101);   // start, rd_a, rd_x, wr_b, xor
    seq_idle = 1;
    #1;
    check("second start", start, 1);
    check("Arp not reloaded", ptr_ld[0], 0);
    check("Xrp not reloaded", ptr_ld[1], 0);
    check("Bwp reloaded", ptr_ld[2], 1);
    check("Yrp not reloaded", ptr_ld[3], 0);
    check("Bwp value", ptr_val[2], 8'hA5);
    @(negedge clk);
    check("cnt kept", cfg.cnt, v[R_CNT]);
    check("alim kept", cfg.alim, v[R_ALIM]);
    check("skip clamped", cfg.bskip, 4);
    check("new cmd", cfg.cmd, 6'b011110);
    // a register write without a start bit does not start anything
    wr(R_CNT, 8'd9);
    repeat (2) @(negedge clk);
    check("no start without start bit", start, 0);
    check("cnt not yet active", cfg.cnt, v[R_CNT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
