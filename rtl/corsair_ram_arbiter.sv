// corsair_ram_arbiter: shares the data RAM between the cell and the CPU.
//
// The cell has its own bus to the RAM and absolute priority on it, so it
// always runs at one access per clock. A CPU access is granted only in a
// cycle in which the cell makes no access (the cell is idle, or it is in a
// bus cycle it leaves free: the fourth cycle of 32-bit mode, a read past its
// limit or disabled, a skipped write); otherwise the CPU sees gnt low and
// must hold its request, i.e. it is stalled. The CPU read data is valid in
// the granted cycle. The priority rule follows the described dedicated bus;
// the stall handshake is this implementation's choice.
module corsair_ram_arbiter
  import corsair_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t cell_req,
  input  mem_req_t cpu_req,
  output logic     cpu_gnt,
  output mem_req_t ram_req
);
  always_comb begin
    cpu_gnt = cpu_req.req && !cell_req.req;
    ram_req = cell_req.req ? cell_req : cpu_req;
  end

  // A CPU request that was refused is still there in the next cycle.
  a_cpu_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (cpu_req.req && !cpu_gnt) |=> (cpu_req.req && $stable(cpu_req.addr) && $stable(cpu_req.we)));
endmodule
