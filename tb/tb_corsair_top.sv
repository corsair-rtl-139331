// tb_corsair_top: end-to-end test of the coprocessor subsystem.
//
// A CPU model loads operands into the RAM through its arbitrated port,
// programs random cell operations through the register port (sometimes
// queueing the next one while the current one runs, sometimes leaving
// pointers to continue where they stopped), keeps accessing a scratch area
// of the RAM while the cell runs, and finally reads every byte back through
// its port and compares it with tb_corsair_ref_pkg. It counts how often each
// mechanism of the design happened and fails if one never did: 24-bit and
// 32-bit mode, XOR, A and X read disabled, write disabled, read limits
// reached before the end, write skip, y taken from b, queued start, pointers
// continued, Yrp auto-increment chaining, CPU stalled and CPU served while
// the cell was busy.
module tb_corsair_top;
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

  byte_t       model [256];
  logic [31:0] b_model;
  addr_t       p_model [4];
  int checks = 0, failures = 0;
  int busy_cycles = 0;

  typedef enum int {
    M_MODE24, M_MODE32, M_XOR, M_NO_A, M_NO_X, M_NO_WRITE, M_A_LIMIT, M_X_LIMIT,
    M_SKIP, M_Y_FROM_B, M_QUEUED, M_PTR_CONTINUE, M_YRP_CHAIN, M_CPU_STALL,
    M_CPU_SERVED_BUSY, M_NUM
  } mech_t;
  int mech [M_NUM];

  always_ff @(posedge clk) begin
    if (cell_busy) busy_cycles <= busy_cycles + 1;
    if (cpu_ram_req.req && !cpu_ram_gnt) mech[M_CPU_STALL] <= mech[M_CPU_STALL] + 1;
    if (cpu_ram_req.req && cpu_ram_gnt && cell_busy)
      mech[M_CPU_SERVED_BUSY] <= mech[M_CPU_SERVED_BUSY] + 1;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // SFR port: one CPU write per cycle
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

  // RAM port: hold the request until granted
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

  task automatic wait_idle();
    byte_t st;
    do sfr_read(R_STATUS, st); while (st[1:0] != 2'b00);
  endtask

  // Program one operation; ptr_mask selects which pointers are written.
  task automatic program_op(op_t op, logic [3:0] ptr_mask);
    for (int i = 0; i < 4; i++)
      if (ptr_mask[i]) sfr_write(4'(i), (i == 0) ? op.arp : (i == 1) ? op.xrp : (i == 2) ? op.bwp : op.yrp);
    sfr_write(R_CNT, op.cfg.cnt);
    sfr_write(R_ALIM, op.cfg.alim);
    sfr_write(R_XLIM, op.cfg.xlim);
    sfr_write(R_BSKIP, 8'(op.cfg.bskip));
    sfr_write(R_CMD, cmd_byte(op.cfg.cmd));
  endtask

  // CPU traffic on the scratch area 240..255 while the cell runs
  logic traffic_on = 0;
  initial begin
    byte_t d, exp;
    addr_t a;
    forever begin
      @(negedge clk);
      if (traffic_on) begin
        a = 8'($urandom_range(240, 255));
        if ($urandom_range(0, 1) == 0) begin
          d = 8'($urandom);
          ram_access(1'b1, a, d, exp);
          model[a] = d;
        end else begin
          exp = model[a];
          ram_access(1'b0, a, 8'h00, d);
          check("CPU read during cell operation", d, exp);
        end
      end
    end
  end

  function automatic void count(op_t op, logic yrp_kept);
    int n1 = int'(op.cfg.cnt) + 1;
    if (op.cfg.cmd.mode32) mech[M_MODE32]++; else mech[M_MODE24]++;
    if (op.cfg.cmd.xor_mode) mech[M_XOR]++;
    if (!op.cfg.cmd.rd_a_en) mech[M_NO_A]++;
    if (!op.cfg.cmd.rd_x_en) mech[M_NO_X]++;
    if (!op.cfg.cmd.wr_b_en) mech[M_NO_WRITE]++;
    if (op.cfg.cmd.rd_a_en && int'(op.cfg.alim) < n1) mech[M_A_LIMIT]++;
    if (op.cfg.cmd.rd_x_en && int'(op.cfg.xlim) < n1) mech[M_X_LIMIT]++;
    if (op.cfg.bskip != 0 && op.cfg.cmd.wr_b_en) mech[M_SKIP]++;
    if (op.cfg.cmd.y_from_b) mech[M_Y_FROM_B]++;
    if (yrp_kept && !op.cfg.cmd.y_from_b) mech[M_YRP_CHAIN]++;
  endfunction

  // Regions: A 0..69, X 70..139, B 140..209, Y 210..239, CPU scratch 240..255.
  function automatic op_t rand_op(logic allow_yb);
    op_t op;
    op.cfg.cnt   = 8'($urandom_range(1, 64));
    op.arp       = 8'($urandom_range(64, 69));
    op.xrp       = 8'($urandom_range(134, 139));
    op.bwp       = 8'($urandom_range(204, 209));
    op.yrp       = 8'($urandom_range(210, 220));
    op.cfg.alim  = 8'($urandom_range(0, 66));
    op.cfg.xlim  = 8'($urandom_range(0, 66));
    op.cfg.bskip = 3'($urandom_range(0, 4));
    op.cfg.cmd.mode32   = 1'($urandom);
    op.cfg.cmd.rd_a_en  = ($urandom_range(0, 5) != 0);
    op.cfg.cmd.rd_x_en  = ($urandom_range(0, 5) != 0);
    op.cfg.cmd.wr_b_en  = ($urandom_range(0, 5) != 0);
    op.cfg.cmd.xor_mode = ($urandom_range(0, 5) == 0);
    op.cfg.cmd.y_from_b = allow_yb && ($urandom_range(0, 3) == 0);
    return op;
  endfunction

  task automatic compare_ram(string tag);
    byte_t d;
    int bad = 0;
    for (int i = 0; i < 240; i++) begin
      ram_access(1'b0, addr_t'(i), 8'h00, d);
      if (d != model[i]) begin
        bad++;
        if (bad < 4) $display("  %s ram[%0d] = %0h expected %0h", tag, i, d, model[i]);
      end
    end
    check({tag, " RAM contents"}, bad, 0);
  endtask

  initial begin
    op_t op, op2;
    byte_t d;
    int cyc, c0;
    logic [3:0] mask;
    sfr_we = 0; sfr_addr = '0; sfr_wdata = '0; cpu_ram_req = '0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    b_model = '0;
    for (int i = 0; i < 4; i++) p_model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 240; i < 256; i++) begin
      model[i] = 8'($urandom);
      ram_access(1'b1, addr_t'(i), model[i], d);
    end

    for (int t = 0; t < 24; t++) begin
      // CPU loads fresh operands through its RAM port
      for (int i = 0; i < 240; i++) begin
        model[i] = 8'($urandom);
        ram_access(1'b1, addr_t'(i), model[i], d);
      end
      for (int s = 0; s < 4; s++) begin
        op = rand_op(t > 0 || s > 0);
        // keep some pointers from the previous operation
        mask = 4'b1111;
        if (t > 0 || s > 0) begin
          if ($urandom_range(0, 2) == 0) mask[0] = 0;
          if ($urandom_range(0, 2) == 0) mask[3] = 0;
        end
        // continue with Arp only where A then stays inside its region
        if (!mask[0] && p_model[0] <= 69 && p_model[0] >= 8'(op.cfg.cnt)) op.arp = p_model[0];
        else mask[0] = 1;
        if (!mask[3]) begin
          op.yrp = p_model[3];
          if (op.yrp > 235) mask[3] = 1;
        end
        if (!mask[0]) mech[M_PTR_CONTINUE]++;
        count(op, !mask[3]);
        c0 = busy_cycles;
        traffic_on = 1;
        program_op(op, mask);
        cyc = ref_run(model, op, b_model, p_model);
        // sometimes queue a second operation behind the running one
        if ($urandom_range(0, 1) == 0) begin
          op2 = rand_op(1'b1);
          program_op(op2, 4'b1111);
          sfr_read(R_STATUS, d);
          if (d[1:0] == 2'b11) mech[M_QUEUED]++;
          count(op2, 1'b0);
          cyc += ref_run(model, op2, b_model, p_model);
        end
        wait_idle();
        traffic_on = 0;
        repeat (4) @(negedge clk);
        check("busy cycles", busy_cycles - c0, cyc);
        for (int i = 0; i < 4; i++) begin
          sfr_read(4'(R_B0 + i), d);
          check("captured bytes", d, b_model[8*i +: 8]);
          sfr_read(4'(i), d);
          check("live pointer", d, p_model[i]);
        end
      end
      compare_ram($sformatf("round %0d", t));
    end

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %s: %0d", mech_t'(i), mech[i]);
      check($sformatf("mechanism %s happened", mech_t'(i)), mech[i] > 0, 1);
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
