// pim_pkg: types and constants shared by the concurrent-access PIM design.
//
// Holds the DRAM command encoding seen on a rank's command bus, the DDR4
// timing set (DDR4-2400, cycles of the 1.2 GHz DRAM clock), the PIM operation
// codes of the vector PE, the 32-byte launch packet layout and the PE
// microcode table. The timing values and the list of operations follow the
// evaluation set-up of the design; the encodings, field widths and packet
// layout are this design's own choices.
//
// Linting this package on its own reports DDR4_2400 and FP_ONE as unused
// (the modules that import them use them). It also reports the column
// field of the candidate command in dram_cmd_legal as unused: column
// commands are timed per bank and bank group, never per column.
package pim_pkg;

  // ------------------------------------------------------------------
  // DRAM organisation of one rank (8 Gb x8 DDR4 device, 16 banks)
  // ------------------------------------------------------------------
  localparam int unsigned BG_W   = 2;                  // 4 bank groups
  localparam int unsigned BK_W   = 2;                  // 4 banks per group
  localparam int unsigned BANK_W = BG_W + BK_W;        // 16 banks
  localparam int unsigned NBANKS = 1 << BANK_W;
  localparam int unsigned ROW_W  = 16;                 // 64K rows
  localparam int unsigned COL_W  = 7;                  // 128 x 8B bursts per 1 KiB page (per chip)

  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_PRE = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } dram_cmd_e;

  typedef struct packed {
    dram_cmd_e          cmd;
    logic [BANK_W-1:0]  bank;    // {bank group, bank}
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
  } dram_cmd_t;

  // DDR4-2400 timing parameters (DRAM clock cycles)
  typedef struct packed {
    logic [7:0] tBL, tCCDS, tCCDL, tRTRS, tCL, tRCD, tRP, tCWL, tRAS, tRC,
                tRTP, tWTRS, tWTRL, tWR, tRRDS, tRRDL, tFAW;
  } dram_timing_t;

  localparam dram_timing_t DDR4_2400 = '{
    tBL: 8'd4, tCCDS: 8'd4, tCCDL: 8'd6, tRTRS: 8'd2, tCL: 8'd16, tRCD: 8'd16,
    tRP: 8'd16, tCWL: 8'd12, tRAS: 8'd39, tRC: 8'd55, tRTP: 8'd9, tWTRS: 8'd3,
    tWTRL: 8'd9, tWR: 8'd18, tRRDS: 8'd4, tRRDL: 8'd6, tFAW: 8'd26
  };

  // ------------------------------------------------------------------
  // PIM vector operations (x, y in DRAM; result written or reduced)
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_COPY  = 4'd0,   // y = x
    OP_SCAL  = 4'd1,   // x = alpha * x
    OP_AXPY  = 4'd2,   // y = alpha * x + y
    OP_XPY   = 4'd3,   // y = alpha * y + x
    OP_AXPBY = 4'd4,   // z = alpha * x + beta * y
    OP_XMY   = 4'd5,   // z = x .* y
    OP_DOT   = 4'd6,   // c = x . y
    OP_NRM2  = 4'd7    // c = x . x (square root taken by the host)
  } pim_op_e;

  // One operand: the DRAM row where it starts and the bank holding it.
  typedef struct packed {
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
  } pim_opnd_t;

  // 32-byte launch packet, sent as four 8-byte writes (word 0 first).
  typedef struct packed {
    logic [31:0] beta;       // word 3 [63:32]
    logic [31:0] alpha;      // word 3 [31:0]
    logic [11:0] rsvd;       // word 2 [63:52]
    pim_opnd_t   z;          // word 2 [51:32]
    logic [11:0] rsvd1;      // word 2 [31:20]
    pim_opnd_t   y;          // word 2 [19:0]
    logic [11:0] rsvd2;      // word 1 [63:52]
    pim_opnd_t   x;          // word 1 [51:32]
    logic [23:0] nbeats;     // word 1 [31:8]  vector length in 8-byte beats
    logic [3:0]  rsvd3;      // word 1 [7:4]
    pim_op_e     op;         // word 1 [3:0]
    logic [63:0] rsvd4;      // word 0: reserved (packet header slot)
  } pim_packet_t;

  // ------------------------------------------------------------------
  // PE microcode: what each operation reads, computes and writes.
  // r = fma(a1, b1, fma(a0, b0, c0)) when two_step, else fma(a0, b0, c0).
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {
    SRC_ZERO = 3'd0, SRC_ONE = 3'd1, SRC_X = 3'd2, SRC_Y = 3'd3,
    SRC_ALPHA = 3'd4, SRC_BETA = 3'd5, SRC_ACC = 3'd6, SRC_T = 3'd7
  } fma_src_e;

  typedef enum logic [1:0] { DST_NONE = 2'd0, DST_X = 2'd1, DST_Y = 2'd2, DST_Z = 2'd3 } pim_dst_e;

  typedef struct packed {
    logic     need_y;     // a second read phase streams y
    logic     reduce;     // result goes to the accumulators, not to DRAM
    logic     two_step;
    fma_src_e a0, b0, c0, a1, b1;
    pim_dst_e dst;
  } pim_ucode_t;

  function automatic pim_ucode_t pim_ucode(pim_op_e op);
    pim_ucode_t u;
    u = '{need_y: 1'b0, reduce: 1'b0, two_step: 1'b0, a0: SRC_X, b0: SRC_ONE,
          c0: SRC_ZERO, a1: SRC_ZERO, b1: SRC_ZERO, dst: DST_Y};
    case (op)
      OP_COPY:  begin u.a0 = SRC_X;     u.b0 = SRC_ONE;   u.c0 = SRC_ZERO; u.dst = DST_Y; end
      OP_SCAL:  begin u.a0 = SRC_ALPHA; u.b0 = SRC_X;     u.c0 = SRC_ZERO; u.dst = DST_X; end
      OP_AXPY:  begin u.need_y = 1'b1; u.a0 = SRC_ALPHA; u.b0 = SRC_X; u.c0 = SRC_Y; u.dst = DST_Y; end
      OP_XPY:   begin u.need_y = 1'b1; u.a0 = SRC_ALPHA; u.b0 = SRC_Y; u.c0 = SRC_X; u.dst = DST_Y; end
      OP_AXPBY: begin u.need_y = 1'b1; u.two_step = 1'b1;
                      u.a0 = SRC_BETA; u.b0 = SRC_Y; u.c0 = SRC_ZERO;
                      u.a1 = SRC_ALPHA; u.b1 = SRC_X; u.dst = DST_Z; end
      OP_XMY:   begin u.need_y = 1'b1; u.a0 = SRC_X; u.b0 = SRC_Y; u.c0 = SRC_ZERO; u.dst = DST_Z; end
      OP_DOT:   begin u.need_y = 1'b1; u.reduce = 1'b1;
                      u.a0 = SRC_X; u.b0 = SRC_Y; u.c0 = SRC_ACC; u.dst = DST_NONE; end
      OP_NRM2:  begin u.reduce = 1'b1; u.a0 = SRC_X; u.b0 = SRC_X; u.c0 = SRC_ACC; u.dst = DST_NONE; end
      default:  ;
    endcase
    return u;
  endfunction

  localparam logic [31:0] FP_ONE = 32'h3F80_0000;

  // ------------------------------------------------------------------
  // Bank and timing state of one rank, as kept by the state table.
  // Each wait counter holds the cycles left before that command class is
  // allowed again (0 = allowed now).
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             open;
    logic [ROW_W-1:0] row;
    logic [7:0]       act_wait;   // tRP, tRC
    logic [7:0]       col_wait;   // tRCD
    logic [7:0]       pre_wait;   // tRAS, tRTP, write recovery
  } bank_state_t;

  typedef struct packed {
    logic [7:0] rd_wait;          // tCCD, write-to-read turnaround
    logic [7:0] wr_wait;          // tCCD, read-to-write turnaround
    logic [7:0] act_wait;         // tRRD
  } bg_state_t;

  typedef bank_state_t [NBANKS-1:0]       bank_state_vec_t;
  typedef bg_state_t   [(1<<BG_W)-1:0]    bg_state_vec_t;

  // Is command c legal now, given the rank state?
  function automatic logic dram_cmd_legal(bank_state_vec_t bs, bg_state_vec_t gs, dram_cmd_t c);
    bank_state_t b;
    bg_state_t   g;
    b = bs[c.bank];
    g = gs[c.bank[BANK_W-1 -: BG_W]];
    case (c.cmd)
      CMD_ACT: return !b.open && (b.act_wait == 0) && (g.act_wait == 0);
      CMD_PRE: return  b.open && (b.pre_wait == 0);
      CMD_RD:  return  b.open && (b.row == c.row) && (b.col_wait == 0) && (g.rd_wait == 0);
      CMD_WR:  return  b.open && (b.row == c.row) && (b.col_wait == 0) && (g.wr_wait == 0);
      default: return 1'b1;
    endcase
  endfunction

  // Command needed next to reach (bank,row) for a column access.
  function automatic dram_cmd_e dram_next_cmd(bank_state_vec_t bs, logic [BANK_W-1:0] bank,
                                              logic [ROW_W-1:0] row, logic is_write);
    if (!bs[bank].open)          return CMD_ACT;
    else if (bs[bank].row != row) return CMD_PRE;
    else                          return is_write ? CMD_WR : CMD_RD;
  endfunction

  // Throttling mode for PIM writes
  typedef enum logic [1:0] { THR_NONE = 2'd0, THR_NRP = 2'd1, THR_STOCH = 2'd2 } thr_mode_e;

endpackage
