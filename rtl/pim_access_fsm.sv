// pim_access_fsm: the memory-access sequencer of one PIM operation.
//
// A launched vector operation is processed in batches of BATCH 8-byte beats
// (1 KiB, one DRAM page of one chip). For each batch the FSM streams the x
// operand into the PE buffer (phase RDX), then, for two-operand operations,
// opens the y row and streams y (RDY) while the PE computes, waits until the
// last result is in the buffer (WAIT) and finally drains the buffer to the
// destination operand (WR, the write phase in which PIM writes are
// throttled). Batch b of an operand lives in row (operand row + b) of the
// operand's bank, beats at columns 0..BATCH-1. Reduction operations (DOT,
// NRM2) skip the write phase and wait once at the end for the last beat to
// reach the accumulators.
//
// The sequence depends only on the launched packet and on when the memory
// controller accepts each access (acc_done), never on data, so an identical
// instance on the host side, fed the same launch and the same CPU commands,
// follows this one cycle for cycle (the replicated FSM of the design). The
// batch size and the two-phase flow follow the design; the per-row operand
// placement and the fixed drain wait are this design's choices.
//
// Timing: `launch` in cycle t starts the first request in cycle t+1; a
// request stays valid until the cycle its column command is issued.
//
// Only the operation, length and operand fields of the packet and the
// need_y/reduce/dst bits of the microcode steer the access sequence. The
// remaining bits (scalars, reserved words, FMA sources) are left unread, and
// lint lists them as unused.
module pim_access_fsm
  import pim_pkg::*;
#(
  parameter int unsigned BATCH      = 128,
  parameter int unsigned DRAIN_WAIT = 24      // read latency + PE latency, in cycles
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             launch,
  input  pim_packet_t      pkt,
  input  logic             acc_done,     // current access issued by the memory controller
  output logic             req_valid,
  output logic             req_write,
  output logic [BANK_W-1:0] req_bank,
  output logic [ROW_W-1:0] req_row,
  output logic [COL_W-1:0] req_col,
  output logic             wr_phase,     // write buffer is draining
  output logic             busy,
  output logic             done          // one-cycle pulse at the end of the operation
);
  typedef enum logic [2:0] { S_IDLE, S_RDX, S_RDY, S_WAIT, S_WR, S_FIN } state_e;

  state_e      st;
  pim_packet_t p;
  pim_ucode_t  uc;
  logic [23:0] remaining;      // beats not yet started, including current batch
  logic [23:0] blen;           // beats in the current batch
  logic [15:0] bidx;           // batch index
  logic [23:0] beat;
  logic [7:0]  wcnt;
  pim_opnd_t   dsto;

  assign uc = pim_ucode(p.op);

  always_comb begin
    case (uc.dst)
      DST_X:   dsto = p.x;
      DST_Z:   dsto = p.z;
      default: dsto = p.y;
    endcase
  end

  assign req_valid = (st == S_RDX) || (st == S_RDY) || (st == S_WR);
  assign req_write = (st == S_WR);
  assign req_bank  = (st == S_RDX) ? p.x.bank : (st == S_RDY) ? p.y.bank : dsto.bank;
  assign req_row   = ((st == S_RDX) ? p.x.row : (st == S_RDY) ? p.y.row : dsto.row) + ROW_W'(bidx);
  assign req_col   = COL_W'(beat);
  assign wr_phase  = (st == S_WR);
  assign busy      = (st != S_IDLE);

  function automatic logic [23:0] batch_len(logic [23:0] rem);
    return (rem > 24'(BATCH)) ? 24'(BATCH) : rem;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; p <= '0; remaining <= '0; blen <= '0; bidx <= '0;
      beat <= '0; wcnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (launch) begin
          p         <= pkt;
          remaining <= pkt.nbeats;
          blen      <= batch_len(pkt.nbeats);
          bidx      <= '0;
          beat      <= '0;
          st        <= (pkt.nbeats == 0) ? S_FIN : S_RDX;
          wcnt      <= '0;
        end
        S_RDX, S_RDY, S_WR: if (acc_done) begin
          if (beat + 24'd1 < blen) begin
            beat <= beat + 24'd1;
          end else begin
            beat <= '0;
            if (st == S_RDX && uc.need_y) st <= S_RDY;
            else if (st != S_WR && !uc.reduce) begin st <= S_WAIT; wcnt <= 8'(DRAIN_WAIT); end
            else begin
              // batch finished
              remaining <= remaining - blen;
              blen      <= batch_len(remaining - blen);
              bidx      <= bidx + 16'd1;
              if (remaining == blen) begin st <= S_FIN; wcnt <= 8'(DRAIN_WAIT); end
              else                   st <= S_RDX;
            end
          end
        end
        S_WAIT: begin
          if (wcnt == 0) st <= S_WR;
          else           wcnt <= wcnt - 8'd1;
        end
        S_FIN: begin
          if (wcnt == 0) begin st <= S_IDLE; done <= 1'b1; end
          else           wcnt <= wcnt - 8'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
