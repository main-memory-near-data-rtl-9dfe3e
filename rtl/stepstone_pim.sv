// stepstone_pim: one StepStone PIM unit executing a sub-GEMM, C += A_p * B.
//
// The weight matrix A (M x K fp32, row-major, K = 2^k_log2, base aligned to
// the matrix size) lies in memory as the host's XOR mapping scattered it.
// This unit works only on the cache blocks of A that map to its PIM ID and to
// one block group: within a group, blocks in the same matrix row share C
// elements and blocks in the same column share B elements. The address
// generator (stepstone_agen) skips straight from one such block to the next.
// For each 16-element block of row m starting at column k the unit reads the
// C row (m - m0) from the scratchpad into a SIMD accumulator, performs 16
// SIMD fused multiply-adds acc[n] += A[m][k+j] * B[k+j-k0][n] over the batch
// lanes n < N, and writes the accumulator back. Rows are limited to
// [m0, m1) and columns to the partition [k0, k1): a block left of k0 moves
// the search to column k0 of its row, a block at or beyond k1 to column k0 of
// the next row. While a block is computed the generator already searches for
// the next one, so its latency is hidden.
//
// The host fills B and C in the scratchpad before the kernel and drains C
// after it (the design's buffer fill/drain, Algorithm 1); B row i sits in
// scratchpad row i and C row i in row c_base + i, one SIMD-wide row each.
// Control/status registers (32-bit, word addressed):
//   0 A base   1 k_log2   2 m0   3 m1   4 k0   5 k1   6 PIM ID   7 group ID
//   8 N (batch, 1..SIMD)   9 c_base   10 write 1 = start
//   read 11: {busy, 7'b0, blocks processed [23:0]}   read 12: AGEN correction steps
// The group ID holds one bit per PIM-ID bit; a bit is used only when that
// PIM-ID bit depends on both column and row address bits of the matrix (the
// row part of its parity). SIMD width (8) and scratchpad size (8 KiB) are
// the bank-group-level configuration of the design; the register map, the
// scratchpad layout and the one-block-at-a-time schedule are this design's.
// Requires k0 and k1 to be multiples of 16.
//
// Memory interface: a request is accepted when mem_req_valid and
// mem_req_ready are both high; the 64-byte block returns later on
// mem_rsp_valid, one outstanding request at a time.
module stepstone_pim #(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned SIMD      = 8,
  parameter int unsigned SPM_BYTES = 8192,
  parameter int unsigned NID       = 4,
  parameter logic [ADDR_W-1:0] ID_MASK [NID] = '{
    ADDR_W'((1 << 7)  | (1 << 14)),                                        // ID0: BG0
    ADDR_W'((1 << 15) | (1 << 20)),                                        // ID1: BG1
    ADDR_W'((1 << 18) | (1 << 23)),                                        // ID2: rank
    ADDR_W'((1 << 8) | (1 << 9) | (1 << 12) | (1 << 13) | (1 << 18) | (1 << 19)) // ID3: channel
  },
  localparam int unsigned SPM_ROWS = SPM_BYTES / (4 * SIMD),
  localparam int unsigned SA_W     = $clog2(SPM_ROWS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control/status registers
  input  logic                  csr_we,
  input  logic [3:0]            csr_addr,
  input  logic [31:0]           csr_wdata,
  output logic [31:0]           csr_rdata,
  // host access to the scratchpad (buffer fill / drain)
  input  logic                  spm_we,
  input  logic [SA_W-1:0]       spm_addr,
  input  logic [32*SIMD-1:0]    spm_wdata,
  output logic [32*SIMD-1:0]    spm_rdata,
  // memory side
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic [ADDR_W-1:0]     mem_req_addr,
  input  logic                  mem_rsp_valid,
  input  logic [511:0]          mem_rsp_data,
  output logic                  busy,
  output logic                  done          // one-cycle pulse at kernel end
);
  localparam int unsigned NC = 2 * NID;

  logic [31:0] r_base, r_klog, r_m0, r_m1, r_k0, r_k1, r_n, r_cbase;
  logic [NID-1:0] r_id, r_gid;
  logic [23:0] blocks;
  logic [31:0] steps_total;

  logic [32*SIMD-1:0] spm [SPM_ROWS];

  // ---------------- address generator ----------------
  logic              ag_start, ag_busy, ag_found, ag_exh;
  logic [ADDR_W-1:0] ag_start_addr, ag_limit, ag_addr;
  logic [ADDR_W-1:0] ag_mask [NC];
  logic [NC-1:0]     ag_target, ag_active;
  logic [7:0]        ag_steps;
  logic [ADDR_W-1:0] colmask, rowmask;

  assign rowmask = ~((ADDR_W'(1) << (r_klog[4:0] + 5'd2)) - ADDR_W'(1));
  assign colmask = ~rowmask & ~ADDR_W'(63);

  always_comb begin
    for (int j = 0; j < NID; j++) begin
      ag_mask[j]         = ID_MASK[j];
      ag_target[j]       = r_id[j];
      ag_active[j]       = 1'b1;
      ag_mask[NID + j]   = ID_MASK[j] & rowmask;
      ag_target[NID + j] = r_gid[j];
      ag_active[NID + j] = ((ID_MASK[j] & rowmask) != '0) && ((ID_MASK[j] & colmask) != '0);
    end
  end

  stepstone_agen #(.ADDR_W(ADDR_W), .NC(NC)) u_agen (
    .clk, .rst_n, .start(ag_start), .start_addr(ag_start_addr), .limit_addr(ag_limit),
    .mask(ag_mask), .target(ag_target), .active(ag_active), .busy(ag_busy),
    .found(ag_found), .exhausted(ag_exh), .addr(ag_addr), .steps(ag_steps)
  );

  // ---------------- SIMD vector unit ----------------
  logic [31:0] acc [SIMD];
  logic [31:0] fr  [SIMD];
  logic [31:0] a_elem;
  logic [31:0] b_row [SIMD];
  logic [SA_W-1:0] rd_row;
  logic [32*SIMD-1:0] rd_data;

  assign rd_data = spm[rd_row];
  for (genvar l = 0; l < SIMD; l++) begin : g_simd
    assign b_row[l] = rd_data[32*l +: 32];
    fp32_fma u_fma (.a(a_elem), .b(b_row[l]), .c(acc[l]), .r(fr[l]));
  end

  // ---------------- kernel FSM ----------------
  typedef enum logic [2:0] { K_IDLE, K_SEARCH, K_REQ, K_RSP, K_LOADC, K_MAC, K_STOREC } kstate_e;
  kstate_e      ks;
  logic [ADDR_W-1:0] cur;                // current block address
  logic [511:0] ablk;
  logic [4:0]   j;
  logic [31:0]  off, m_cur, k_cur;

  assign off   = 32'(cur - r_base[ADDR_W-1:0]);
  assign m_cur = off >> (r_klog[4:0] + 5'd2);
  assign k_cur = (off >> 2) & ((32'd1 << r_klog[4:0]) - 32'd1);
  assign a_elem = ablk[32*j +: 32];
  assign ag_limit = r_base[ADDR_W-1:0] + ADDR_W'(r_m1 << (r_klog[4:0] + 5'd2));

  function automatic logic [ADDR_W-1:0] elem_addr(logic [31:0] base, logic [31:0] m,
                                                   logic [31:0] k, logic [4:0] klog);
    return ADDR_W'(base + (((m << klog) + k) << 2));
  endfunction

  always_comb begin
    rd_row = spm_addr;
    case (ks)
      K_LOADC, K_STOREC: rd_row = SA_W'(r_cbase + (m_cur - r_m0));
      K_MAC:             rd_row = SA_W'(k_cur + 32'(j) - r_k0);
      default:           rd_row = spm_addr;
    endcase
  end
  assign spm_rdata = spm[spm_addr];

  assign mem_req_valid = (ks == K_REQ);
  assign mem_req_addr  = cur;
  assign busy          = (ks != K_IDLE);

  always_comb begin
    ag_start = 1'b0;
    ag_start_addr = '0;
    if (csr_we && csr_addr == 4'd10 && csr_wdata[0] && ks == K_IDLE) begin
      ag_start = 1'b1;
      ag_start_addr = elem_addr(r_base, r_m0, r_k0, r_klog[4:0]);
    end else if (ks == K_SEARCH && ag_found) begin
      if (k_of(ag_addr) < r_k0) begin
        ag_start = 1'b1; ag_start_addr = elem_addr(r_base, m_of(ag_addr), r_k0, r_klog[4:0]);
      end else if (k_of(ag_addr) >= r_k1) begin
        ag_start = 1'b1; ag_start_addr = elem_addr(r_base, m_of(ag_addr) + 32'd1, r_k0, r_klog[4:0]);
      end
    end else if (ks == K_RSP && mem_rsp_valid) begin
      ag_start = 1'b1;                    // look for the next block while computing
      ag_start_addr = cur + ADDR_W'(64);
    end
  end

  function automatic logic [31:0] m_of(logic [ADDR_W-1:0] a);
    return 32'(a - r_base[ADDR_W-1:0]) >> (r_klog[4:0] + 5'd2);
  endfunction
  function automatic logic [31:0] k_of(logic [ADDR_W-1:0] a);
    return (32'(a - r_base[ADDR_W-1:0]) >> 2) & ((32'd1 << r_klog[4:0]) - 32'd1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_base <= '0; r_klog <= '0; r_m0 <= '0; r_m1 <= '0; r_k0 <= '0; r_k1 <= '0;
      r_n <= '0; r_cbase <= '0; r_id <= '0; r_gid <= '0;
      ks <= K_IDLE; cur <= '0; ablk <= '0; j <= '0; blocks <= '0; steps_total <= '0;
      done <= 1'b0;
      for (int l = 0; l < SIMD; l++) acc[l] <= '0;
    end else begin
      done <= 1'b0;
      if (csr_we && ks == K_IDLE) begin
        case (csr_addr)
          4'd0: r_base  <= csr_wdata;
          4'd1: r_klog  <= csr_wdata;
          4'd2: r_m0    <= csr_wdata;
          4'd3: r_m1    <= csr_wdata;
          4'd4: r_k0    <= csr_wdata;
          4'd5: r_k1    <= csr_wdata;
          4'd6: r_id    <= csr_wdata[NID-1:0];
          4'd7: r_gid   <= csr_wdata[NID-1:0];
          4'd8: r_n     <= csr_wdata;
          4'd9: r_cbase <= csr_wdata;
          4'd10: if (csr_wdata[0]) begin
            ks <= K_SEARCH; blocks <= '0; steps_total <= '0;
          end
          default: ;
        endcase
      end
      if (spm_we && ks == K_IDLE) spm[spm_addr] <= spm_wdata;

      case (ks)
        K_IDLE: ;
        K_SEARCH: begin
          if (ag_exh) begin
            ks <= K_IDLE; done <= 1'b1;
          end else if (ag_found && !ag_start) begin
            cur <= ag_addr;
            if (m_of(ag_addr) >= r_m1) begin ks <= K_IDLE; done <= 1'b1; end
            else ks <= K_REQ;
          end
          if (ag_found || ag_exh) steps_total <= steps_total + 32'(ag_steps);
        end
        K_REQ: if (mem_req_ready) ks <= K_RSP;
        K_RSP: if (mem_rsp_valid) begin ablk <= mem_rsp_data; ks <= K_LOADC; end
        K_LOADC: begin
          for (int l = 0; l < SIMD; l++) acc[l] <= rd_data[32*l +: 32];
          j  <= '0;
          ks <= K_MAC;
        end
        K_MAC: begin
          for (int l = 0; l < SIMD; l++) if (32'(l) < r_n) acc[l] <= fr[l];
          j <= j + 5'd1;
          if (j == 5'd15) ks <= K_STOREC;
        end
        K_STOREC: begin
          for (int l = 0; l < SIMD; l++) spm[rd_row][32*l +: 32] <= acc[l];
          blocks <= blocks + 24'd1;
          ks     <= K_SEARCH;
        end
        default: ks <= K_IDLE;
      endcase
    end
  end

  always_comb begin
    case (csr_addr)
      4'd0:  csr_rdata = r_base;
      4'd1:  csr_rdata = r_klog;
      4'd2:  csr_rdata = r_m0;
      4'd3:  csr_rdata = r_m1;
      4'd4:  csr_rdata = r_k0;
      4'd5:  csr_rdata = r_k1;
      4'd6:  csr_rdata = 32'(r_id);
      4'd7:  csr_rdata = 32'(r_gid);
      4'd8:  csr_rdata = r_n;
      4'd9:  csr_rdata = r_cbase;
      4'd11: csr_rdata = {busy, ag_busy, 6'd0, blocks};
      4'd12: csr_rdata = steps_total;
      default: csr_rdata = '0;
    endcase
  end
endmodule
