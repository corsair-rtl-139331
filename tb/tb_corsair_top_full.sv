// tb_corsair_top_full: a full 512 x 512-bit multiplication on the subsystem
// at its default size (256-byte RAM), as a CPU would drive it.
//
// Memory map: X at 0..63, Y at 64..127 (both most significant byte first) and
// the 128-byte product R at 128..255. The cell first clears R (A and X reads
// disabled, a memory initialisation). Then 16 operations in 32-bit mode run
// Horner's rule over Y, four bytes at a time from its most significant end:
//   R <- R * 2^32 + X * y_j
// The shift by 2^32 costs nothing: R is updated in place with Arp = Bwp
// placed four bytes further towards the least significant end each step, the
// four new low bytes being still zero. Yrp is loaded once and then advances
// by itself, and each operation is queued in the shadow registers while the
// previous one runs, so the cell idles one cycle between operations. The
// product is checked against schoolbook multiplication in the testbench and
// the total cycle count against the schedule (7 + 4*cnt cycles per
// operation, the first being the start cycle in which the bus is idle).
module tb_corsair_top_full;
  import corsair_pkg::*;
  import tb_corsair_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       sfr_we;
  logic [3:0] sfr_addr;
  byte_t      sfr_wdata, sfr_rdata;
  mem_req_t   cpu_ram_req;
  logic       cpu_ram_gnt;
  byte_t      cpu_ram_rdata;
  logic       cell_busy, cell_done;

  corsair_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
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

  task automatic ram_access(logic we, addr_t a, byte_t wd, output byte_t rd);
    @(negedge clk);
    cpu_ram_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    #1;
    while (!cpu_ram_gnt) begin
      @(negedge clk);
      #1;
    end
    rd = cpu_ram_rdata;
    @(negedge clk);
    cpu_ram_req = '0;
  endtask

  // wait until the shadow registers are free (nothing pending)
  task automatic wait_not_pending();
    byte_t st;
    do sfr_read(R_STATUS, st); while (st[1]);
  endtask

  task automatic wait_idle();
    byte_t st;
    do sfr_read(R_STATUS, st); while (st[1:0] != 2'b00);
  endtask

  byte_t xv [64], yv [64];   // index 0 = least significant byte

  initial begin
    byte_t d;
    int    prod [129];
    int    t_start, t_end, expect_cycles, cnt, lsb;
    cmd_t  c;
    sfr_we = 0; sfr_addr = '0; sfr_wdata = '0; cpu_ram_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // operands, stored most significant byte first
    for (int i = 0; i < 64; i++) begin
      xv[i] = 8'($urandom);
      yv[i] = 8'($urandom);
    end
    xv[63] = 8'hFF; yv[63] = 8'hFF;   // full-length operands
    for (int i = 0; i < 64; i++) begin
      ram_access(1'b1, addr_t'(63 - i), xv[i], d);
      ram_access(1'b1, addr_t'(127 - i), yv[i], d);
    end

    // clear R: B <- 0 over 128 bytes
    c = '0; c.wr_b_en = 1'b1;
    sfr_write(R_BWP, 8'd255);
    sfr_write(R_YRP, 8'd64);   // y bytes are read but X is zero
    sfr_write(R_CNT, 8'd128);
    sfr_write(R_ALIM, 8'd0);
    sfr_write(R_XLIM, 8'd0);
    sfr_write(R_BSKIP, 8'd0);
    sfr_write(R_CMD, cmd_byte(c));
    wait_idle();

    // Horner steps; Yrp is written once, before the first step
    c = '0; c.mode32 = 1'b1; c.rd_a_en = 1'b1; c.rd_x_en = 1'b1; c.wr_b_en = 1'b1;
    expect_cycles = 0;
    for (int j = 0; j < 16; j++) begin
      cnt = 64 + 4 * (j + 1);
      lsb = 255 - 4 * (15 - j);
      if (j > 0) wait_not_pending();   // queue behind the running step
      sfr_write(R_ARP, 8'(lsb));
      sfr_write(R_BWP, 8'(lsb));
      sfr_write(R_XRP, 8'd63);
      if (j == 0) sfr_write(R_YRP, 8'd64);
      sfr_write(R_CNT, 8'(cnt));
      sfr_write(R_ALIM, 8'(cnt));
      sfr_write(R_XLIM, 8'd64);
      sfr_write(R_CMD, cmd_byte(c));
      if (j == 0) t_start = cycle;
      // one start cycle, four y loads, two prefetches, four cycles per byte
      expect_cycles += 1 + 4 + 2 + 4 * cnt;
    end
    wait_idle();
    t_end = cycle;

    // reference product
    for (int k = 0; k < 129; k++) prod[k] = 0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        prod[i + j] += int'(xv[i]) * int'(yv[j]);
        for (int k = i + j; prod[k] > 255; k++) begin
          prod[k + 1] += prod[k] >> 8;
          prod[k] &= 255;
        end
      end
    for (int k = 0; k < 128; k++) begin
      ram_access(1'b0, addr_t'(255 - k), 8'h00, d);
      check($sformatf("product byte %0d", k), d, prod[k]);
    end
    sfr_read(R_YRP, d);
    check("Yrp advanced over all of Y", d, 128);
    // every operation back to back: busy except one cycle between them
    $display("16 multiply steps: %0d cycles, schedule %0d (+ status polling)",
             t_end - t_start, expect_cycles);
    checks++;
    if (t_end - t_start < expect_cycles || t_end - t_start > expect_cycles + 8) begin
      failures++;
      $display("FAIL cycle count");
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
