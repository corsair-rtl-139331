// corsair_ptr: an operand pointer of the cell.
//
// An 8-bit address register loaded by the control registers at the start of
// an operation and stepped by one after every access it makes, so the cell
// walks through a large integer without help from the CPU. With UP = 0 it
// counts down (Arp, Xrp, Bwp: integers are processed from their least
// significant byte, stored at the highest address); with UP = 1 it counts up
// (Yrp, which keeps its place between operations so a long multiplier is
// consumed a few bytes at a time). A load has priority over a step in the same
// cycle. The value wraps modulo 256.
module corsair_ptr
  import corsair_pkg::*;
#(
  parameter bit UP = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld,      // load ld_val
  input  addr_t ld_val,
  input  logic  step,    // an access used the pointer this cycle
  output addr_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (ld)   q <= ld_val;
    else if (step) q <= UP ? q + 8'd1 : q - 8'd1;
  end
endmodule
