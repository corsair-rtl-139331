// tb_corsair_mac: checks p = x*y + a + b on corner values and random operands,
// including the all-ones case that must exactly reach 16'hFFFF.
module tb_corsair_mac;
  import corsair_pkg::*;
  byte_t       x, y, a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  corsair_mac dut (.*);

  task automatic try(byte_t xv, byte_t yv, byte_t av, byte_t bv);
    int exp;
    x = xv; y = yv; a = av; b = bv;
    #1;
    exp = int'(xv) * int'(yv) + int'(av) + int'(bv);
    checks++;
    if (int'(p) != exp) begin
      failures++;
      $display("FAIL %0d*%0d+%0d+%0d = %0d, expected %0d", xv, yv, av, bv, p, exp);
    end
  endtask

  initial begin
    try(8'hFF, 8'hFF, 8'hFF, 8'hFF);
    try(0, 0, 0, 0);
    try(8'hFF, 8'hFF, 0, 0);
    try(1, 1, 8'hFF, 8'hFF);
    try(8'h80, 8'h02, 8'h01, 8'h00);
    for (int i = 0; i < 20000; i++) try(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
