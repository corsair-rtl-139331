// corsair_datapath: operand registers, accumulation latches and MAC of the cell.
//
// Implements B <- y*X + A one X byte at a time, with y of N = 3 bytes (24-bit
// mode) or N = 4 bytes (32-bit mode). For the current byte xi, the N bus
// cycles of a loop iteration compute, with one multiply-accumulate each,
//   phase 0:  tmp = xi*y[0] + ai     + latchd   -> bi = low(tmp)
//   phase j:  tmp = xi*y[j] + latcha + latchd   -> low(tmp) is queued
// where latcha carries the high byte from one phase to the next and latchd is
// the head of a short queue of pending result bytes for the next positions
// (latchd, latchb, and in 32-bit mode latche). At the end of an iteration the
// queue holds positions k+1 .. k+N-1 and latcha holds position k+N, so each
// iteration emits exactly one finished byte bi (position k), least
// significant first. The register names, the queue moves and the operand
// pipeline (ait/xit read during the loop, copied to ai/xi on the last bus
// cycle) follow the described design; the phase-0 queue move, the use of
// latche as a third queue stage in 32-bit mode and the clearing of the
// latches at operation start (ctl.clr) and of b[3:0] after y is loaded
// (ctl.clr_b) are this implementation's own choices.
//
// XOR mode replaces the arithmetic result by bi = ai ^ xi and leaves the
// latches alone. The first four result bytes of an operation are shifted into
// b[3:0] (b[0] least significant) so that a 4-byte result can be reused as y
// for the next operation (ld_y_b).
//
// Timing: all registers change on the rising clock edge selected by ctl (see
// corsair_pkg::dp_ctl_t); operand bytes come in on rdata in the same cycle.
module corsair_datapath
  import corsair_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  dp_ctl_t     ctl,
  input  logic        mode32,
  input  logic        xor_mode,
  input  byte_t       rdata,   // bus read data
  output byte_t       bi,      // result byte to write
  output logic [31:0] b_cap    // captured result bytes b[3:0], b[0] in [7:0]
);
  byte_t y [4];
  byte_t ai, xi, ait, xit;
  byte_t latcha, latchb, latchd, latche;

  byte_t       opnd;
  byte_t       mac_y, mac_a;
  logic [15:0] tmp;
  byte_t       bi_next;

  always_comb begin
    opnd    = ctl.use_mem ? rdata : 8'h00;
    mac_y   = y[ctl.phase];
    mac_a   = (ctl.phase == 2'd0) ? ai : latcha;
    bi_next = xor_mode ? (ai ^ xi) : tmp[7:0];
  end

  corsair_mac u_mac (
    .x(xi),
    .y(mac_y),
    .a(mac_a),
    .b(latchd),
    .p(tmp)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) y[i] <= '0;
      ai <= '0; xi <= '0; ait <= '0; xit <= '0;
      latcha <= '0; latchb <= '0; latchd <= '0; latche <= '0;
      bi <= '0;
      b_cap <= '0;
    end else begin
      if (ctl.clr) begin
        latcha <= '0; latchb <= '0; latchd <= '0; latche <= '0;
        bi <= '0;
      end
      if (ctl.clr_b) b_cap <= '0;
      if (ctl.ld_y) y[ctl.y_idx] <= opnd;
      if (ctl.ld_y_b) for (int i = 0; i < 4; i++) y[i] <= b_cap[8*i +: 8];
      if (ctl.ld_ai)  ai  <= opnd;
      if (ctl.ld_xi)  xi  <= opnd;
      if (ctl.ld_ait) ait <= opnd;
      if (ctl.ld_xit) xit <= opnd;
      if (ctl.mac_en) begin
        if (ctl.phase == 2'd0) begin
          bi <= bi_next;
          if (ctl.cap_b) b_cap <= {bi_next, b_cap[31:8]};
          if (!xor_mode) begin
            latchd <= latchb;
            latchb <= mode32 ? latche : latcha;
            latche <= latcha;
            latcha <= tmp[15:8];
          end
        end else if (!xor_mode) begin
          latchd <= latchb;
          latcha <= tmp[15:8];
          if (mode32) begin
            latchb <= latche;
            latche <= tmp[7:0];
          end else begin
            latchb <= tmp[7:0];
          end
        end
        if (ctl.last_phase) begin
          xi <= xit;
          ai <= ait;
        end
      end
    end
  end
endmodule
