// tb_corsair_modexp: modular exponentiation X^E mod M on the subsystem, with
// a 256-bit modulus (the size of one half of a 512-bit CRT signature) and a
// 32-bit exponent, all arithmetic done by the cell.
//
// The testbench plays the CPU. Each modular multiplication R = A*Y mod M
// processes the multiplier Y (33 bytes) 24 bits at a time from its most
// significant end, alternating two cell operations:
//   multiplication step (24-bit mode):  T = R*2^24 + A*y_j
//   reduction step      (32-bit mode):  R = T + q*Mc  (mod 2^264)
// where Mc = 2^264 - M is the modulus in two's complement, so adding q*Mc
// subtracts q*M. The CPU estimates q = floor(T_top / (M_top + 1)) from the top
// 64 bits of T and the top 32 bits of M; this never overshoots and leaves
// R < 2M, so every value fits in 33 bytes. The shift by 2^24 is free: R is
// read three bytes early, over three bytes kept at zero. Operands are copied
// with block moves (X read disabled) and R is cleared with a memory clear
// (both reads disabled); a final reduction with q = 1 brings R below M.
// The CPU queues each multiplication step while the previous reduction runs.
// The result is compared with a bit-serial reference computed here.
module tb_corsair_modexp;
  import corsair_pkg::*;
  import tb_corsair_ref_pkg::*;

  localparam int L  = 32;      // modulus bytes
  localparam int LR = L + 1;   // bytes of a reduced value (< 2M)
  localparam int LT = L + 4;   // bytes of T
  // memory map: address of the least significant byte of each region
  localparam int MC_LSB   = LR - 1;             // Mc       0..32
  localparam int A_LSB    = MC_LSB + LR;        // A        33..65
  localparam int Y_MSB    = A_LSB + 1;          // Y        66..98 (MSB first)
  localparam int Y_LSB    = Y_MSB + LR - 1;
  localparam int BASE_LSB = Y_LSB + LR;         // base X   99..131
  localparam int P_LSB    = BASE_LSB + LR;      // R        132..164, zeros 165..167
  localparam int Q_LSB    = P_LSB + 3 + LT;     // T        168..203
  localparam int QS       = Q_LSB + 1;          // q slot   204..207 (MSB first)

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
  int n_mul = 0, n_red = 0, n_move = 0, n_clear = 0, n_queued = 0;
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

  task automatic ram_access(logic we, int a, byte_t wd, output byte_t rd);
    @(negedge clk);
    cpu_ram_req = '{req: 1'b1, we: we, addr: addr_t'(a), wdata: wd};
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

  task automatic wait_not_pending();
    byte_t st;
    do sfr_read(R_STATUS, st); while (st[1]);
  endtask

  task automatic op(int arp, int xrp, int bwp, int yrp, int cnt, int alim, int xlim,
                    logic m32, logic ra, logic rx);
    cmd_t c;
    c = '0; c.mode32 = m32; c.rd_a_en = ra; c.rd_x_en = rx; c.wr_b_en = 1'b1;
    sfr_write(R_ARP, 8'(arp));
    sfr_write(R_XRP, 8'(xrp));
    sfr_write(R_BWP, 8'(bwp));
    sfr_write(R_YRP, 8'(yrp));
    sfr_write(R_CNT, 8'(cnt));
    sfr_write(R_ALIM, 8'(alim));
    sfr_write(R_XLIM, 8'(xlim));
    sfr_write(R_BSKIP, 8'd0);
    sfr_write(R_CMD, cmd_byte(c));
  endtask

  // block move of LR bytes, least significant end given
  task automatic move(int src_lsb, int dst_lsb);
    op(src_lsb, 0, dst_lsb, 0, LR, LR, 0, 1'b0, 1'b1, 1'b0);
    n_move++;
    wait_idle();
  endtask

  // ---- bit-serial reference arithmetic on little-endian byte vectors ----
  typedef byte_t num_t [LR + 1];
  num_t mod_m;

  function automatic logic ge(num_t a, num_t b);
    for (int i = LR; i >= 0; i--) if (a[i] != b[i]) return a[i] > b[i];
    return 1'b1;
  endfunction

  function automatic num_t sub(num_t a, num_t b);
    int br = 0;
    num_t r;
    for (int i = 0; i <= LR; i++) begin
      int d = int'(a[i]) - int'(b[i]) - br;
      br = (d < 0) ? 1 : 0;
      r[i] = 8'(d);
    end
    return r;
  endfunction

  function automatic num_t add(num_t a, num_t b);
    int cy = 0;
    num_t r;
    for (int i = 0; i <= LR; i++) begin
      int s = int'(a[i]) + int'(b[i]) + cy;
      cy = s >> 8;
      r[i] = 8'(s);
    end
    return r;
  endfunction

  function automatic num_t ref_modmul(num_t a, num_t b);
    num_t r;
    for (int i = 0; i <= LR; i++) r[i] = 0;
    for (int bit_i = 8 * LR - 1; bit_i >= 0; bit_i--) begin
      r = add(r, r);
      if (ge(r, mod_m)) r = sub(r, mod_m);
      if (b[bit_i / 8][bit_i % 8]) begin
        r = add(r, a);
        if (ge(r, mod_m)) r = sub(r, mod_m);
      end
    end
    return r;
  endfunction

  // ---- one modular multiplication by the cell: P <- A * Y mod M (< 2M) ----
  task automatic cell_modmul(int a_src_lsb, int y_src_lsb);
    byte_t d;
    longint t_top, m_top, q;
    move(a_src_lsb, A_LSB);
    move(y_src_lsb, Y_LSB);
    op(0, 0, P_LSB, 0, LR, 0, 0, 1'b0, 1'b0, 1'b0);   // clear R
    n_clear++;
    m_top = 0;
    for (int i = L - 1; i >= L - 4; i--) m_top = (m_top << 8) | longint'(mod_m[i]);
    for (int j = 0; j < LR / 3; j++) begin
      // multiplication step: T = R*2^24 + A*y_j (queued behind the last reduction)
      op(P_LSB + 3, A_LSB, Q_LSB, Y_MSB + 3 * j, LT, LR + 3, LR, 1'b0, 1'b1, 1'b1);
      n_mul++;
      if (j > 0) begin
        sfr_read(R_STATUS, d);
        if (d[1:0] == 2'b11) n_queued++;
      end
      wait_idle();
      // quotient estimate from the top 64 bits of T (bytes 28..35)
      t_top = 0;
      for (int i = LT - 1; i >= LT - 8; i--) begin
        ram_access(1'b0, Q_LSB - i, 8'h00, d);
        t_top = (t_top << 8) | longint'(d);
      end
      q = t_top / (m_top + 1);
      for (int i = 0; i < 4; i++) ram_access(1'b1, QS + i, 8'(q >> (8 * (3 - i))), d);
      // reduction step: R = T + q*Mc mod 2^264
      op(Q_LSB, MC_LSB, P_LSB, QS, LR, LR, LR, 1'b1, 1'b1, 1'b1);
      n_red++;
      wait_not_pending();
    end
    wait_idle();
  endtask

  initial begin
    byte_t d;
    num_t  base, r_ref, one, mc;
    logic [31:0] e;
    int t0;
    sfr_we = 0; sfr_addr = '0; sfr_wdata = '0; cpu_ram_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // random 256-bit odd modulus with its top bit set, base < M, exponent
    for (int i = 0; i <= LR; i++) begin mod_m[i] = 0; base[i] = 0; one[i] = 0; end
    for (int i = 0; i < L; i++) begin mod_m[i] = 8'($urandom); base[i] = 8'($urandom); end
    mod_m[L - 1] |= 8'h80; mod_m[0] |= 8'h01;
    base[L - 1] &= 8'h7F;
    one[0] = 1;
    e = $urandom | 32'h8000_0000;
    // Mc = 2^264 - M over LR bytes
    for (int i = 0; i <= LR; i++) mc[i] = 0;
    mc = sub(mc, mod_m);
    // load Mc, base and R = 1 through the CPU port; clear the zero guard bytes
    for (int i = 0; i < LR; i++) begin
      ram_access(1'b1, MC_LSB - i, mc[i], d);
      ram_access(1'b1, BASE_LSB - i, base[i], d);
      ram_access(1'b1, P_LSB - i, one[i], d);
    end
    for (int i = 1; i <= 3; i++) ram_access(1'b1, P_LSB + i, 8'h00, d);

    t0 = cycle;
    for (int b = 31; b >= 0; b--) begin
      cell_modmul(P_LSB, P_LSB);                // square
      if (e[b]) cell_modmul(P_LSB, BASE_LSB);   // multiply
    end
    // final correction: subtract M while R >= M (R < 2M, so at most once)
    begin
      num_t r;
      for (int i = 0; i <= LR; i++) r[i] = 0;
      for (int i = 0; i < LR; i++) begin
        ram_access(1'b0, P_LSB - i, 8'h00, d);
        r[i] = d;
      end
      if (ge(r, mod_m)) begin
        for (int i = 0; i < 4; i++) ram_access(1'b1, QS + i, (i == 3) ? 8'h01 : 8'h00, d);
        op(P_LSB, MC_LSB, P_LSB, QS, LR, LR, LR, 1'b1, 1'b1, 1'b1);
        n_red++;
        wait_idle();
      end
    end
    $display("X^E mod M, 256-bit M, E = %h: %0d cycles including the CPU's work", e, cycle - t0);

    // reference
    r_ref = one;
    for (int b = 31; b >= 0; b--) begin
      r_ref = ref_modmul(r_ref, r_ref);
      if (e[b]) r_ref = ref_modmul(r_ref, base);
    end
    for (int i = 0; i < LR; i++) begin
      ram_access(1'b0, P_LSB - i, 8'h00, d);
      check($sformatf("result byte %0d", i), d, r_ref[i]);
    end
    $display("operations: %0d multiplication steps, %0d reduction steps, %0d block moves, %0d clears, %0d queued",
             n_mul, n_red, n_move, n_clear, n_queued);
    check("multiplication steps ran", n_mul > 0, 1);
    check("reduction steps ran", n_red > 0, 1);
    check("block moves ran", n_move > 0, 1);
    check("clears ran", n_clear > 0, 1);
    check("steps queued behind a running one", n_queued > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
