// pim_pe: vector processing element on the logic die of one rank.
//
// Two single-precision FMA lanes process one 8-byte beat (two fp32 elements,
// the per-chip access granularity) at a time. Five scalar registers hold
// alpha and beta (operand inputs), the two lane accumulators and one
// temporary. A 1 KiB buffer (BATCH beats) holds one batch: during the x phase
// of an operation the x beats are written into it; during the y phase each
// y beat is combined with the buffered x beat and the result overwrites it;
// the write phase then reads results out by column (wr_idx). One-operand
// operations (COPY, SCAL, NRM2) compute during the x phase. What each
// operation computes comes from a small microcode table (pim_pkg::pim_ucode):
// up to two dependent FMAs per element, r = fma(a1,b1,fma(a0,b0,c0)), run on
// the same FMA in consecutive cycles. Reductions accumulate per lane; when
// the last beat is in, acc0 + acc1 is formed with one more FMA and presented
// on `result`.
//
// The lane count, buffer size, scalar-register count and batch flow follow
// the design. The microcode format, the sequential two-step FMA use and the
// lane-wise reduction order are this design's. The 1 KiB scratchpad of the
// design is not included. Timing: a beat arriving in cycle t is written back
// by the end of cycle t+2 (t+1 for one-step operations); beats must be at
// least three cycles apart, which DRAM column timing (tCCD >= 4) guarantees.
//
// The PE reads only the operation, length and scalar fields of the packet.
// Operand addresses and reserved words belong to the access FSM, and the
// microcode's destination field belongs to the write phase. Lint lists those
// bits as unused.
module pim_pe
  import pim_pkg::*;
#(
  parameter int unsigned BATCH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     launch,
  input  pim_packet_t              pkt,
  input  logic                     rvalid,     // read beat from the DRAM die
  input  logic [63:0]              rdata,
  input  logic [$clog2(BATCH)-1:0] wr_idx,     // buffer column for the write phase
  output logic [63:0]              wdata,
  output logic [31:0]              result,     // reduction result
  output logic                     result_valid
);
  localparam int unsigned IW = $clog2(BATCH);

  logic [63:0] buffer [BATCH];
  pim_ucode_t  uc;
  logic [31:0] alpha, beta;
  logic [31:0] acc [2];
  logic [31:0] tmp [2];
  logic [23:0] remaining, blen, beat;
  logic        in_y;                      // y phase of the batch
  logic [1:0]  stage;                     // 0 idle, 1 first FMA, 2 second FMA, 3 final sum
  logic [31:0] opx [2];
  logic [31:0] opy [2];
  logic [IW-1:0] idx;
  logic [23:0] computed;
  logic [23:0] total;
  logic [31:0] fa [2], fb [2], fc [2], fr [2];

  assign wdata = buffer[wr_idx];

  function automatic logic [31:0] pick(fma_src_e s, logic [31:0] x, logic [31:0] y,
                                       logic [31:0] al, logic [31:0] be,
                                       logic [31:0] ac, logic [31:0] t);
    case (s)
      SRC_ZERO:  return 32'd0;
      SRC_ONE:   return FP_ONE;
      SRC_X:     return x;
      SRC_Y:     return y;
      SRC_ALPHA: return al;
      SRC_BETA:  return be;
      SRC_ACC:   return ac;
      default:   return t;
    endcase
  endfunction

  for (genvar l = 0; l < 2; l++) begin : g_lane
    always_comb begin
      if (stage == 2'd3) begin
        fa[l] = acc[0]; fb[l] = FP_ONE; fc[l] = acc[1];
      end else if (stage == 2'd2) begin
        fa[l] = pick(uc.a1, opx[l], opy[l], alpha, beta, acc[l], tmp[l]);
        fb[l] = pick(uc.b1, opx[l], opy[l], alpha, beta, acc[l], tmp[l]);
        fc[l] = tmp[l];
      end else begin
        fa[l] = pick(uc.a0, opx[l], opy[l], alpha, beta, acc[l], tmp[l]);
        fb[l] = pick(uc.b0, opx[l], opy[l], alpha, beta, acc[l], tmp[l]);
        fc[l] = pick(uc.c0, opx[l], opy[l], alpha, beta, acc[l], tmp[l]);
      end
    end
    fp32_fma u_fma (.a(fa[l]), .b(fb[l]), .c(fc[l]), .r(fr[l]));
  end

  // the beat that arrives now is computed on (last read phase of its batch)
  logic compute_beat;
  assign compute_beat = rvalid && (in_y || !uc.need_y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uc <= pim_ucode(OP_COPY); alpha <= '0; beta <= '0;
      acc[0] <= '0; acc[1] <= '0; tmp[0] <= '0; tmp[1] <= '0;
      remaining <= '0; blen <= '0; beat <= '0; in_y <= 1'b0; stage <= '0;
      opx[0] <= '0; opx[1] <= '0; opy[0] <= '0; opy[1] <= '0; idx <= '0;
      computed <= '0; total <= '0;
      result <= '0; result_valid <= 1'b0;
    end else begin
      if (launch) begin
        uc        <= pim_ucode(pkt.op);
        alpha     <= pkt.alpha;
        beta      <= pkt.beta;
        acc[0]    <= '0; acc[1] <= '0;
        remaining <= pkt.nbeats;
        blen      <= (pkt.nbeats > 24'(BATCH)) ? 24'(BATCH) : pkt.nbeats;
        beat      <= '0;
        in_y      <= 1'b0;
        computed  <= '0;
        total     <= pkt.nbeats;
        result_valid <= 1'b0;
        stage     <= '0;
      end else begin
        // ---- input side: count beats of the batch ----
        if (rvalid) begin
          if (!compute_beat) buffer[IW'(beat)] <= rdata;     // x phase of a two-operand op
          if (beat + 24'd1 < blen) beat <= beat + 24'd1;
          else begin
            beat <= '0;
            if (uc.need_y && !in_y) in_y <= 1'b1;
            else begin
              in_y      <= 1'b0;
              remaining <= remaining - blen;
              blen      <= ((remaining - blen) > 24'(BATCH)) ? 24'(BATCH) : (remaining - blen);
            end
          end
        end
        if (compute_beat) begin
          opx[0] <= in_y ? buffer[IW'(beat)][31:0]  : rdata[31:0];
          opx[1] <= in_y ? buffer[IW'(beat)][63:32] : rdata[63:32];
          opy[0] <= rdata[31:0];
          opy[1] <= rdata[63:32];
          idx    <= IW'(beat);
          stage  <= 2'd1;
        end
        // ---- compute side ----
        if (stage == 2'd1 || stage == 2'd2) begin
          if (stage == 2'd1 && uc.two_step) begin
            tmp[0] <= fr[0]; tmp[1] <= fr[1];
            stage  <= 2'd2;
          end else begin
            if (uc.reduce) begin acc[0] <= fr[0]; acc[1] <= fr[1]; end
            else           buffer[idx] <= {fr[1], fr[0]};
            computed <= computed + 24'd1;
            if (!compute_beat) stage <= (uc.reduce && computed + 24'd1 == total) ? 2'd3 : 2'd0;
          end
        end else if (stage == 2'd3) begin
          result       <= fr[0];
          result_valid <= 1'b1;
          stage        <= 2'd0;
        end
      end
    end
  end
endmodule
