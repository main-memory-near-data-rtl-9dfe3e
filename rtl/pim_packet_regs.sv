// pim_packet_regs: memory-mapped launch registers of one PIM.
//
// The host launches an operation by writing a 32-byte packet (operation,
// vector length, operand base rows and banks, scalars) into a reserved
// region of the PIM's address space, as four 8-byte writes. Words may
// arrive in any order; writing word 3 completes the packet and, if the PIM
// is idle, produces a one-cycle `launch` with the assembled packet in the
// next cycle. A packet completed while the PIM is busy is dropped and
// `overrun` is set until the next launch. The four-write packet follows the
// design; word order, the overrun flag and the field layout (pim_pkg) are
// this design's choices.
module pim_packet_regs
  import pim_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [1:0]  wr_idx,
  input  logic [63:0] wr_data,
  input  logic        pim_busy,
  output logic        launch,
  output pim_packet_t pkt,
  output logic        overrun
);
  logic [63:0] words [4];

  always_comb pkt = pim_packet_t'({words[3], words[2], words[1], words[0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) words[i] <= '0;
      launch  <= 1'b0;
      overrun <= 1'b0;
    end else begin
      launch <= 1'b0;
      if (wr_valid) begin
        words[wr_idx] <= wr_data;
        if (wr_idx == 2'd3) begin
          if (pim_busy) overrun <= 1'b1;
          else begin
            launch  <= 1'b1;
            overrun <= 1'b0;
          end
        end
      end
    end
  end
endmodule
