// corsair_pkg: types and constants shared by the CORSAIR coprocessor cell.
//
// The cell computes B <- y*X + A on large integers held byte by byte in an
// 8-bit RAM, where y is a 24-bit or 32-bit multiplier. Large integers are
// stored most significant byte first, so the A, X and B pointers start at the
// least significant byte (highest address) and count down; the Y pointer
// counts up and so walks a long multiplier from its most significant end.
//
// The byte width, the 8-bit pointers and the split into a memory request and
// its data follow the described design. The register map, the command bit
// layout and the state encoding are this implementation's own choices.
package corsair_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [7:0] addr_t;

  // One access on the dedicated RAM bus (read data returns combinationally).
  typedef struct packed {
    logic  req;    // an access takes place this cycle
    logic  we;     // 1 = write, 0 = read
    addr_t addr;
    byte_t wdata;
  } mem_req_t;

  // Command register bits (bit 0 of the CPU write is the start bit, not stored).
  typedef struct packed {
    logic y_from_b;  // take y from the 4 captured result bytes b[3:0]
    logic xor_mode;  // B <- A xor X, byte by byte
    logic wr_b_en;   // write result bytes to B
    logic rd_x_en;   // read X (else X is taken as zero)
    logic rd_a_en;   // read A (else A is taken as zero)
    logic mode32;    // 32-bit y, four bus cycles per X byte (else 24-bit, three)
  } cmd_t;

  // Operation parameters held in the active control registers.
  typedef struct packed {
    cmd_t       cmd;
    byte_t      cnt;    // loop count: result bytes produced
    byte_t      alim;   // read_A_lim: bytes of A read, zero afterwards
    byte_t      xlim;   // read_X_lim: bytes of X read, zero afterwards
    logic [2:0] bskip;  // write_B_lim: first result bytes not written (0..4)
  } cfg_t;

  // Per-cycle control of the datapath, issued by the sequencer.
  typedef struct packed {
    logic       clr;         // clear the latches (operation start)
    logic       clr_b;       // clear the capture register b[3:0] (after y is loaded)
    logic       ld_y;        // load y[y_idx] from the bus
    logic [1:0] y_idx;
    logic       ld_y_b;      // load y[3:0] from b[3:0]
    logic       ld_ai;       // prologue: ai <- operand byte
    logic       ld_xi;       // prologue: xi <- operand byte
    logic       ld_ait;      // loop: ait <- operand byte
    logic       ld_xit;      // loop: xit <- operand byte
    logic       use_mem;     // operand byte is the bus read data (else zero)
    logic       mac_en;      // a multiply-accumulate step happens this cycle
    logic [1:0] phase;       // bus cycle within the loop iteration
    logic       last_phase;  // last bus cycle: xi <- xit, ai <- ait
    logic       cap_b;       // shift the new result byte into b[3:0]
  } dp_ctl_t;

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_LOADY = 3'd1,
    S_PREA  = 3'd2,
    S_PREX  = 3'd3,
    S_RUN   = 3'd4
  } seq_state_t;

  // Control register addresses seen by the CPU.
  localparam logic [3:0] R_ARP    = 4'd0;
  localparam logic [3:0] R_XRP    = 4'd1;
  localparam logic [3:0] R_BWP    = 4'd2;
  localparam logic [3:0] R_YRP    = 4'd3;
  localparam logic [3:0] R_CNT    = 4'd4;
  localparam logic [3:0] R_ALIM   = 4'd5;
  localparam logic [3:0] R_XLIM   = 4'd6;
  localparam logic [3:0] R_BSKIP  = 4'd7;
  localparam logic [3:0] R_CMD    = 4'd8;
  localparam logic [3:0] R_STATUS = 4'd9;
  localparam logic [3:0] R_B0     = 4'd10;  // R_B0..R_B3: captured bytes b[0..3]

  // Command register bit positions as written by the CPU.
  localparam int C_START    = 0;
  localparam int C_MODE32   = 1;
  localparam int C_RD_A     = 2;
  localparam int C_RD_X     = 3;
  localparam int C_WR_B     = 4;
  localparam int C_XOR      = 5;
  localparam int C_Y_FROM_B = 6;

endpackage
