// stepstone_dma: replication/reduction engine of the StepStone PIM controller.
//
// Before a GEMM, the activation matrix B is copied into a private region of
// every PIM unit that needs it. After the GEMM, the partial C results of those
// units are summed into one C. The engine does both, one 64-byte cache block
// at a time.
//   REPLICATE: block i of the source (src_base + 64 i) is read once and
//     written to base[d] + 64 i for every unit d selected in the mask.
//   REDUCE:    block i is read from base[d] + 64 i for every selected unit,
//     the 16 fp32 elements are summed lane by lane (fp32_fma with b = 1.0,
//     units added in ascending order) and the sum is written to
//     dst_base + 64 i.
// The host computes which units need which blocks and programs one range
// per call. Each source block is read only once per call.
//
// Registers (32-bit, word addressed):
//   0 mode (0 replicate, 1 reduce)   1 src_base   2 dst_base   3 block count
//   4 unit mask (bit d = unit d)     5 write 1 = start
//   16+d  base address of unit d's private region
//   read 6: {busy, 7'b0, blocks done [23:0]}
// The engine's purpose and its read-once/copy-to-all flow follow the design.
// The register map, the per-call mask and the serial one-block schedule are
// this design's own choices.
//
// Memory port: a request is accepted when mem_req_valid && mem_req_ready.
// Reads (mem_req_we = 0) return one block on mem_rsp_valid some cycles
// later, one read outstanding at a time. Writes carry mem_req_wdata and have
// no response. Timing: a replicate block costs one read plus one accepted
// write per selected unit. A reduce block costs one read per selected unit
// plus one write. The engine spends one cycle on every unit index, selected
// or not.
module stepstone_dma #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned NPIM   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              csr_we,
  input  logic [4:0]        csr_addr,
  input  logic [31:0]       csr_wdata,
  output logic [31:0]       csr_rdata,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output logic [511:0]      mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  logic [511:0]      mem_rsp_data,
  output logic              busy,
  output logic              done       // one-cycle pulse when a call completes
);
  localparam logic [31:0] FP_ONE = 32'h3F80_0000;
  localparam int unsigned DW = (NPIM > 1) ? $clog2(NPIM) : 1;

  typedef enum logic [2:0] { S_IDLE, S_RD, S_WAIT, S_NEXT, S_WR, S_STEP } state_e;
  state_e state;

  logic              mode;
  logic [ADDR_W-1:0] src_base, dst_base;
  logic [23:0]       nblk, blk;
  logic [NPIM-1:0]   mask;
  logic [ADDR_W-1:0] base [NPIM];
  logic [DW-1:0]     d;
  logic              last_d;
  logic [511:0]      buf_q, sum;
  logic [ADDR_W-1:0] off;

  assign off    = ADDR_W'(blk) << 6;
  assign last_d = (d == DW'(NPIM - 1));
  assign busy   = (state != S_IDLE);

  // lane-wise sum of the returned block and the running sum
  for (genvar e = 0; e < 16; e++) begin : g_lane
    fp32_fma u_add (.a(mem_rsp_data[32*e +: 32]), .b(FP_ONE), .c(buf_q[32*e +: 32]),
                    .r(sum[32*e +: 32]));
  end

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = buf_q;
    case (state)
      S_RD: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = (mode ? base[d] : src_base) + off;
      end
      S_WR: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = (mode ? dst_base : base[d]) + off;
      end
      default: ;
    endcase
  end

  always_comb begin
    csr_rdata = '0;
    if (csr_addr == 5'd6) csr_rdata = {busy, 7'd0, blk};
    else if (csr_addr >= 5'd16 && int'(csr_addr) < 16 + int'(NPIM))
      csr_rdata = 32'(base[DW'(csr_addr - 5'd16)]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; mode <= 1'b0; src_base <= '0; dst_base <= '0; nblk <= '0; blk <= '0;
      mask <= '0; d <= '0; buf_q <= '0; done <= 1'b0;
      for (int i = 0; i < int'(NPIM); i++) base[i] <= '0;
    end else begin
      done <= 1'b0;
      if (csr_we && state == S_IDLE) begin
        case (csr_addr)
          5'd0: mode     <= csr_wdata[0];
          5'd1: src_base <= ADDR_W'(csr_wdata);
          5'd2: dst_base <= ADDR_W'(csr_wdata);
          5'd3: nblk     <= csr_wdata[23:0];
          5'd4: mask     <= NPIM'(csr_wdata);
          default: if (csr_addr >= 5'd16 && int'(csr_addr) < 16 + int'(NPIM))
                     base[DW'(csr_addr - 5'd16)] <= ADDR_W'(csr_wdata);
        endcase
      end
      case (state)
        S_IDLE:
          if (csr_we && csr_addr == 5'd5 && csr_wdata[0]) begin
            blk <= '0; d <= '0; buf_q <= '0;
            if (csr_wdata[0] && nblk == 0) done <= 1'b1;
            else state <= mode ? S_NEXT : S_RD;
          end
        // read: the source block (replicate) or unit d's partial block (reduce)
        S_RD:   if (mem_req_ready) state <= S_WAIT;
        S_WAIT:
          if (mem_rsp_valid) begin
            if (mode) begin
              buf_q <= sum;
              if (last_d) state <= S_WR;
              else begin d <= d + 1'b1; state <= S_NEXT; end
            end else begin
              buf_q <= mem_rsp_data; d <= '0; state <= S_NEXT;
            end
          end
        // pick the next selected unit, one index per cycle
        S_NEXT:
          if (mask[d]) state <= mode ? S_RD : S_WR;
          else if (!last_d) d <= d + 1'b1;
          else state <= mode ? S_WR : S_STEP;
        S_WR:
          if (mem_req_ready) begin
            if (mode || last_d) state <= S_STEP;
            else begin d <= d + 1'b1; state <= S_NEXT; end
          end
        S_STEP: begin
          blk <= blk + 1'b1; d <= '0; buf_q <= '0;
          if (blk + 1'b1 == nblk) begin state <= S_IDLE; done <= 1'b1; end
          else state <= mode ? S_NEXT : S_RD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
