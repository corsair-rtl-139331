// corsair_ctrl_regs: the cell's CPU-visible control registers, double buffered.
//
// The CPU sees the cell as a small set of 8-bit internal registers (address
// map in corsair_pkg): the pointers Arp, Xrp, Bwp, Yrp, the cycle count, the
// two read limits, the write skip, the command register and a status
// register. Writes go to a shadow copy, so the CPU can prepare the next
// operation while the cell runs the current one. Writing the command
// register with the start bit set makes the shadow copy pending; as soon as
// the sequencer is idle, `start` is raised for one cycle and, on that clock
// edge, the registers written since the previous start are copied to the
// active set (pointers are loaded into the sequencer's pointer registers).
// Registers not rewritten keep their active value, so a pointer continues
// from where the previous operation left it and a count can be reused.
//
// Reads return the live pointers, the active count/limits/skip/command, the
// status {5'b0, done, pending, busy} and the captured result bytes b[0..3].
// `done` is a sticky flag set at the end of an operation and cleared by the
// next start. Reads have no side effects. The double register set, the start
// bit and the status register follow the described design; the address map,
// the write-tracking rule and the status layout are this implementation's
// choices.
module corsair_ctrl_regs
  import corsair_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU register port
  input  logic        sfr_we,
  input  logic [3:0]  sfr_addr,
  input  byte_t       sfr_wdata,
  output byte_t       sfr_rdata,
  // sequencer side
  input  logic        seq_idle,
  input  logic        seq_done,
  input  addr_t       ptr_q [4],
  input  logic [31:0] b_cap,
  output logic        start,
  output cfg_t        cfg,
  output logic        ptr_ld [4],
  output addr_t       ptr_val [4]
);
  // shadow copies, indexed by register address R_ARP .. R_CMD
  byte_t      shadow [9];
  logic [8:0] dirty;
  logic       pending, done_flag;

  always_comb begin
    start = pending && seq_idle;
    for (int i = 0; i < 4; i++) begin
      ptr_ld[i]  = dirty[i];
      ptr_val[i] = shadow[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 9; i++) shadow[i] <= '0;
      dirty     <= '0;
      pending   <= 1'b0;
      done_flag <= 1'b0;
      cfg       <= '0;
    end else begin
      if (start) begin
        if (dirty[R_CNT])   cfg.cnt   <= shadow[R_CNT];
        if (dirty[R_ALIM])  cfg.alim  <= shadow[R_ALIM];
        if (dirty[R_XLIM])  cfg.xlim  <= shadow[R_XLIM];
        if (dirty[R_BSKIP]) cfg.bskip <= (shadow[R_BSKIP] > 8'd4) ? 3'd4 : shadow[R_BSKIP][2:0];
        if (dirty[R_CMD]) begin
          cfg.cmd.mode32   <= shadow[R_CMD][C_MODE32];
          cfg.cmd.rd_a_en  <= shadow[R_CMD][C_RD_A];
          cfg.cmd.rd_x_en  <= shadow[R_CMD][C_RD_X];
          cfg.cmd.wr_b_en  <= shadow[R_CMD][C_WR_B];
          cfg.cmd.xor_mode <= shadow[R_CMD][C_XOR];
          cfg.cmd.y_from_b <= shadow[R_CMD][C_Y_FROM_B];
        end
        pending   <= 1'b0;
        done_flag <= 1'b0;
      end else if (seq_done) begin
        done_flag <= 1'b1;
      end
      // a CPU write in the start cycle already belongs to the next operation
      dirty <= start ? '0 : dirty;
      if (sfr_we && sfr_addr <= R_CMD) begin
        shadow[sfr_addr]             <= sfr_wdata;
        dirty[sfr_addr]              <= 1'b1;
        if (sfr_addr == R_CMD && sfr_wdata[C_START]) pending <= 1'b1;
      end
    end
  end

  always_comb begin
    sfr_rdata = '0;
    case (sfr_addr)
      R_ARP, R_XRP, R_BWP, R_YRP: sfr_rdata = ptr_q[sfr_addr[1:0]];
      R_CNT:    sfr_rdata = cfg.cnt;
      R_ALIM:   sfr_rdata = cfg.alim;
      R_XLIM:   sfr_rdata = cfg.xlim;
      R_BSKIP:  sfr_rdata = {5'b0, cfg.bskip};
      R_CMD:    sfr_rdata = {1'b0, cfg.cmd.y_from_b, cfg.cmd.xor_mode, cfg.cmd.wr_b_en,
                             cfg.cmd.rd_x_en, cfg.cmd.rd_a_en, cfg.cmd.mode32, 1'b0};
      R_STATUS: sfr_rdata = {5'b0, done_flag, pending, !seq_idle};
      4'd10, 4'd11, 4'd12, 4'd13: sfr_rdata = b_cap[8*(sfr_addr - R_B0) +: 8];
      default:  sfr_rdata = '0;
    endcase
  end

  // A start bit written while an operation is already pending would be lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (sfr_we && sfr_addr == R_CMD && sfr_wdata[C_START]) |-> (!pending || start));
endmodule
