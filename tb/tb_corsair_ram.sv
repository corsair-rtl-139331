// tb_corsair_ram: fills the RAM through random writes, then checks that every
// read returns the last value written to its address in the same cycle, and
// that a read without write does not change the contents.
module tb_corsair_ram;
  import corsair_pkg::*;
  logic     clk = 0;
  always #5 clk = ~clk;
  mem_req_t req;
  byte_t    rdata;
  byte_t    model [256];
  logic     known [256];
  int checks = 0, failures = 0;

  corsair_ram dut (.clk, .req, .rdata);

  initial begin
    req = '0;
    for (int i = 0; i < 256; i++) known[i] = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b1, addr: addr_t'(i), wdata: 8'($urandom)};
      model[i] = req.wdata; known[i] = 1;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req.req   = 1'($urandom);
      req.we    = req.req && ($urandom_range(0, 2) == 0);
      req.addr  = 8'($urandom);
      req.wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata != model[req.addr]) begin
        failures++;
        $display("FAIL read [%0d] = %0h exp %0h", req.addr, rdata, model[req.addr]);
      end
      if (req.req && req.we) model[req.addr] = req.wdata;
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
