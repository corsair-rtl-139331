// tb_corsair_ram_arbiter: random cell traffic against a CPU that issues
// requests and holds each one until granted. Checks that the cell always owns
// the RAM port when it requests, that the CPU is granted exactly in the free
// cycles, and counts both stalls and grants.
module tb_corsair_ram_arbiter;
  import corsair_pkg::*;
  logic     clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mem_req_t cell_req, cpu_req, ram_req;
  logic     cpu_gnt;
  int checks = 0, failures = 0, stalls = 0, grants = 0;

  corsair_ram_arbiter dut (.*);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    cell_req = '0; cpu_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // a granted (or absent) CPU request may be replaced by a new one
      if (!cpu_req.req || cpu_gnt)
        cpu_req = '{req: 1'($urandom), we: 1'($urandom), addr: 8'($urandom), wdata: 8'($urandom)};
      cell_req = '{req: ($urandom_range(0, 3) != 0), we: 1'($urandom), addr: 8'($urandom), wdata: 8'($urandom)};
      #1;
      if (cell_req.req) begin
        check("cell owns the port", ram_req == cell_req);
        check("cpu not granted", !cpu_gnt);
        if (cpu_req.req) stalls++;
      end else begin
        check("cpu granted when it asks", cpu_gnt == cpu_req.req);
        if (cpu_req.req) begin
          check("cpu owns the port", ram_req == cpu_req);
          grants++;
        end else begin
          check("no access", !ram_req.req);
        end
      end
    end
    check("cpu stalled at least once", stalls > 0);
    check("cpu granted at least once", grants > 0);
    $display("stalls=%0d grants=%0d", stalls, grants);
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
