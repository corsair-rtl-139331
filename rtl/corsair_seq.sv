// corsair_seq: bus-cycle sequencer of the cell, with its four operand pointers.
//
// One bus cycle is one clock cycle; in each the sequencer makes at most one
// access on the cell's dedicated RAM bus and tells the datapath what to do.
// An operation (started by a one-cycle `start` while idle) runs:
//   S_IDLE   the cycle in which start is seen: pointers and latches are set up
//   S_LOADY  N reads y[N-1] .. y[0] at Yrp, Yrp counting up (most significant
//            byte first, the integer's storage order); or one cycle copying
//            y from the captured bytes b[3:0] when cmd.y_from_b is set
//   S_PREA   prefetch a0 = *Arp--
//   S_PREX   prefetch x0 = *Xrp--
//   S_RUN    cnt iterations of N bus cycles (N = 3, or 4 in 32-bit mode):
//            phase 0 reads the next A byte, phase 1 the next X byte, phase 2
//            writes the result byte bi at Bwp--, phase 3 (32-bit only) makes
//            no access. Every phase is one multiply-accumulate step.
// So an operation takes 1 + N + 2 + cnt*N cycles (1 + 1 + 2 + cnt*N with
// y_from_b); `done` pulses in its last cycle and the sequencer is idle in the
// next.
//
// read_A_lim / read_X_lim (cfg.alim, cfg.xlim) count the bytes of A and X
// that are read, the prefetch included; after that, or when reading is
// disabled by the command, the operand is zero and the bus cycle is left free.
// This empties the pipeline without padding the operands in memory.
// write_B_lim (cfg.bskip, 0..4) suppresses the writes of the first result
// bytes, which gives right shifts of up to 4 bytes; writes can also be
// disabled altogether. The first four result bytes are always captured in
// b[3:0] by the datapath. The phase assignment of the accesses and the 4th
// silent cycle follow the described design; the prologue order, the
// counting of limits and the y byte order are this implementation's choices.
module corsair_seq
  import corsair_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,       // begin an operation (only while idle)
  input  cfg_t     cfg,         // active operation parameters (stable while busy)
  input  logic     ptr_ld [4],  // load pointer 0 Arp, 1 Xrp, 2 Bwp, 3 Yrp on start
  input  addr_t    ptr_val [4],
  input  byte_t    bi,          // result byte from the datapath
  output logic     idle,
  output logic     done,        // last cycle of an operation
  output mem_req_t mem,
  output dp_ctl_t  dp,
  output addr_t    ptr_q [4]    // live pointer values
);
  seq_state_t state;
  logic [1:0] ycnt, phase;
  byte_t      iter, a_left, x_left;
  logic [2:0] skip_left, cap_left;

  logic [1:0] last_ph;
  logic       last_iter, rd_a_ok, rd_x_ok, wr_ok;
  logic       step [4];

  always_comb begin
    last_ph   = cfg.cmd.mode32 ? 2'd3 : 2'd2;
    last_iter = (iter == 8'd1);
    rd_a_ok   = cfg.cmd.rd_a_en && (a_left != 8'd0);
    rd_x_ok   = cfg.cmd.rd_x_en && (x_left != 8'd0);
    wr_ok     = cfg.cmd.wr_b_en && (skip_left == 3'd0);
  end

  // Bus request, datapath control and pointer steps for the current cycle.
  always_comb begin
    mem  = '0;
    dp   = '0;
    done = 1'b0;
    for (int i = 0; i < 4; i++) step[i] = 1'b0;
    mem.wdata = bi;
    dp.phase  = phase;
    case (state)
      S_IDLE: dp.clr = start;
      S_LOADY: begin
        if (cfg.cmd.y_from_b) begin
          dp.ld_y_b = 1'b1;
        end else begin
          mem.req    = 1'b1;
          mem.addr   = ptr_q[3];
          step[3]    = 1'b1;
          dp.ld_y    = 1'b1;
          dp.use_mem = 1'b1;
          dp.y_idx   = last_ph - ycnt;
        end
      end
      S_PREA: begin
        dp.clr_b   = 1'b1;
        dp.ld_ai   = 1'b1;
        dp.use_mem = rd_a_ok;
        mem.req    = rd_a_ok;
        mem.addr   = ptr_q[0];
        step[0]    = rd_a_ok;
      end
      S_PREX: begin
        dp.ld_xi   = 1'b1;
        dp.use_mem = rd_x_ok;
        mem.req    = rd_x_ok;
        mem.addr   = ptr_q[1];
        step[1]    = rd_x_ok;
        done       = (cfg.cnt == 8'd0);
      end
      S_RUN: begin
        dp.mac_en     = 1'b1;
        dp.last_phase = (phase == last_ph);
        dp.cap_b      = (phase == 2'd0) && (cap_left != 3'd0);
        done          = last_iter && (phase == last_ph);
        case (phase)
          2'd0: begin
            dp.ld_ait  = 1'b1;
            dp.use_mem = rd_a_ok;
            mem.req    = rd_a_ok;
            mem.addr   = ptr_q[0];
            step[0]    = rd_a_ok;
          end
          2'd1: begin
            dp.ld_xit  = 1'b1;
            dp.use_mem = rd_x_ok;
            mem.req    = rd_x_ok;
            mem.addr   = ptr_q[1];
            step[1]    = rd_x_ok;
          end
          2'd2: begin
            mem.req  = wr_ok;
            mem.we   = wr_ok;
            mem.addr = ptr_q[2];
            step[2]  = wr_ok;
          end
          default: ;  // 32-bit mode: no access in the fourth bus cycle
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ycnt      <= '0;
      phase     <= '0;
      iter      <= '0;
      a_left    <= '0;
      x_left    <= '0;
      skip_left <= '0;
      cap_left  <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOADY;
          ycnt  <= '0;
        end
        S_LOADY: begin
          // limits and counters are taken from cfg, which is stable from here
          a_left    <= cfg.alim;
          x_left    <= cfg.xlim;
          skip_left <= cfg.bskip;
          cap_left  <= 3'd4;
          iter      <= cfg.cnt;
          phase     <= '0;
          if (cfg.cmd.y_from_b || ycnt == last_ph) state <= S_PREA;
          else ycnt <= ycnt + 2'd1;
        end
        S_PREA: begin
          if (rd_a_ok) a_left <= a_left - 8'd1;
          state <= S_PREX;
        end
        S_PREX: begin
          if (rd_x_ok) x_left <= x_left - 8'd1;
          state <= (cfg.cnt == 8'd0) ? S_IDLE : S_RUN;
        end
        S_RUN: begin
          case (phase)
            2'd0: if (rd_a_ok) a_left <= a_left - 8'd1;
            2'd1: if (rd_x_ok) x_left <= x_left - 8'd1;
            default: ;
          endcase
          if (phase == 2'd0 && cap_left != 3'd0) cap_left <= cap_left - 3'd1;
          if (phase == last_ph) begin
            phase <= '0;
            iter  <= iter - 8'd1;
            if (skip_left != 3'd0) skip_left <= skip_left - 3'd1;
            if (last_iter) state <= S_IDLE;
          end else begin
            phase <= phase + 2'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb idle = (state == S_IDLE);

  for (genvar i = 0; i < 4; i++) begin : g_ptr
    corsair_ptr #(.UP(i == 3)) u_ptr (
      .clk   (clk),
      .rst_n (rst_n),
      .ld    (start && idle && ptr_ld[i]),
      .ld_val(ptr_val[i]),
      .step  (step[i]),
      .q     (ptr_q[i])
    );
  end

  // The cell never starts a new operation while one is running.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> idle);
  // Accesses in the loop happen only in the phase the schedule reserves for them.
  a_no_access_ph3: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state == S_RUN && phase == 2'd3) |-> !mem.req);
endmodule
