// corsair_ram: the card's data RAM, DEPTH x 8 bits (256 bytes by default).
//
// One access per clock: a read returns mem[addr] combinationally in the same
// cycle, a write stores wdata on the rising edge. The contents are not reset.
// The size follows the described card; the read timing is this
// implementation's choice, made so that a full access fits in one bus cycle.
module corsair_ram
  import corsair_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic     clk,
  input  mem_req_t req,
  output byte_t    rdata
);
  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.req && req.we) mem[req.addr] <= req.wdata;
  end

  always_comb rdata = mem[req.addr];
endmodule
