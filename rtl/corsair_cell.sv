// corsair_cell: the CORSAIR arithmetic coprocessor cell.
//
// Computes B <- y*X + A on large integers in RAM (plus block moves, memory
// clears, byte shifts and XOR as special cases of the command bits) while the
// CPU is free to do other work. The CPU programs the double-buffered control
// registers (corsair_ctrl_regs) through an 8-bit register port; the sequencer
// (corsair_seq) drives a dedicated RAM bus with one access per clock, and the
// datapath (corsair_datapath) does one 8x8 multiply with two 8-bit additions
// per clock. Memory read data must be valid in the cycle of the request
// (asynchronous read); a write happens on the clock edge ending the cycle.
// The cell assumes it is always granted the bus when it makes a request.
module corsair_cell
  import corsair_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU register port
  input  logic        sfr_we,
  input  logic [3:0]  sfr_addr,
  input  byte_t       sfr_wdata,
  output byte_t       sfr_rdata,
  // dedicated RAM bus
  output mem_req_t    mem,
  input  byte_t       mem_rdata,
  // status
  output logic        busy,
  output logic        done
);
  logic        start, seq_idle;
  cfg_t        cfg;
  logic        ptr_ld [4];
  addr_t       ptr_val [4];
  addr_t       ptr_q [4];
  dp_ctl_t     dp;
  byte_t       bi;
  logic [31:0] b_cap;

  corsair_ctrl_regs u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .sfr_we   (sfr_we),
    .sfr_addr (sfr_addr),
    .sfr_wdata(sfr_wdata),
    .sfr_rdata(sfr_rdata),
    .seq_idle (seq_idle),
    .seq_done (done),
    .ptr_q    (ptr_q),
    .b_cap    (b_cap),
    .start    (start),
    .cfg      (cfg),
    .ptr_ld   (ptr_ld),
    .ptr_val  (ptr_val)
  );

  corsair_seq u_seq (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .cfg    (cfg),
    .ptr_ld (ptr_ld),
    .ptr_val(ptr_val),
    .bi     (bi),
    .idle   (seq_idle),
    .done   (done),
    .mem    (mem),
    .dp     (dp),
    .ptr_q  (ptr_q)
  );

  corsair_datapath u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctl     (dp),
    .mode32  (cfg.cmd.mode32),
    .xor_mode(cfg.cmd.xor_mode),
    .rdata   (mem_rdata),
    .bi      (bi),
    .b_cap   (b_cap)
  );

  always_comb busy = !seq_idle;
endmodule
