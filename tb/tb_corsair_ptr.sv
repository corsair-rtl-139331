// tb_corsair_ptr: random load/step sequences on a down-counting and an
// up-counting pointer, compared with a software model (load has priority,
// values wrap modulo 256).
module tb_corsair_ptr;
  import corsair_pkg::*;
  logic  clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  ld, step;
  addr_t ld_val, q_dn, q_up;
  int checks = 0, failures = 0;

  corsair_ptr #(.UP(1'b0)) u_dn (.clk, .rst_n, .ld, .ld_val, .step, .q(q_dn));
  corsair_ptr #(.UP(1'b1)) u_up (.clk, .rst_n, .ld, .ld_val, .step, .q(q_up));

  initial begin
    int m_dn, m_up;
    ld = 0; step = 0; ld_val = 0;
    m_dn = 0; m_up = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      ld     = ($urandom_range(0, 9) == 0);
      step   = 1'($urandom);
      ld_val = (i < 20) ? 8'(i) : 8'($urandom);  // early loads near 0 exercise the wrap
      @(negedge clk);
      if (ld) begin m_dn = ld_val; m_up = ld_val; end
      else if (step) begin m_dn = (m_dn + 255) % 256; m_up = (m_up + 1) % 256; end
      checks += 2;
      if (q_dn != addr_t'(m_dn)) begin failures++; $display("FAIL down %0d exp %0d", q_dn, m_dn); end
      if (q_up != addr_t'(m_up)) begin failures++; $display("FAIL up %0d exp %0d", q_up, m_up); end
    end
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
