// corsair_top: the CORSAIR smart-card coprocessor subsystem.
//
// The arithmetic cell (corsair_cell) with its dedicated bus to the card's
// 256-byte data RAM (corsair_ram), and the arbiter that lets the CPU use the
// RAM in every cycle the cell leaves free (corsair_ram_arbiter). The CPU
// itself, its ROM and EEPROM are outside: the top brings out the CPU's
// control-register port and its RAM port (request struct, grant, read data).
// A CPU RAM request with cpu_ram_gnt low must be held until granted.
module corsair_top
  import corsair_pkg::*;
#(
  parameter int RAM_DEPTH = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  // CPU internal-register port to the cell
  input  logic       sfr_we,
  input  logic [3:0] sfr_addr,
  input  byte_t      sfr_wdata,
  output byte_t      sfr_rdata,
  // CPU port to the data RAM
  input  mem_req_t cpu_ram_req,
  output logic     cpu_ram_gnt,
  output byte_t    cpu_ram_rdata,
  // cell status
  output logic     cell_busy,
  output logic     cell_done
);
  mem_req_t cell_req, ram_req;
  byte_t    ram_rdata;

  corsair_cell u_cell (
    .clk      (clk),
    .rst_n    (rst_n),
    .sfr_we   (sfr_we),
    .sfr_addr (sfr_addr),
    .sfr_wdata(sfr_wdata),
    .sfr_rdata(sfr_rdata),
    .mem      (cell_req),
    .mem_rdata(ram_rdata),
    .busy     (cell_busy),
    .done     (cell_done)
  );

  corsair_ram_arbiter u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .cell_req(cell_req),
    .cpu_req (cpu_ram_req),
    .cpu_gnt (cpu_ram_gnt),
    .ram_req (ram_req)
  );

  corsair_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk  (clk),
    .req  (ram_req),
    .rdata(ram_rdata)
  );

  always_comb cpu_ram_rdata = ram_rdata;
endmodule
