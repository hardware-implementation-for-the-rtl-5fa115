// fme_control: the state machine that sequences the FME engine.
//
// A prediction unit (PU) of 8x8, 16x16, 32x32 or 64x64 samples is processed as
// 1, 4, 16 or 64 sub-blocks of 8x8 in raster order. Each sub-block takes 51
// issue slots:
//   slots  0..15  H phase: window rows 0..15 (block rows -4..11) are read from
//                 the reference memory and filtered horizontally (27 H-type
//                 samples per row, all stored in the H-type buffer);
//   slots 16..23  V phase: block columns 0..7 (window columns 4..11) are read
//                 and filtered vertically (27 V-type samples per column);
//   slots 24..50  D phase: the 27 columns of the H-type buffer are read and
//                 filtered vertically (27 D-type samples per column), in groups
//                 of three (quarter, half, three-quarter) per position k = 0..8.
// The H buffer is complete before the D phase starts, and the next sub-block's
// H writes arrive only after the last D read, so sub-blocks and PUs follow each
// other with no gap: 51 cycles per 8x8 block, 204 per 16x16 PU.
//
// Interface: start/pu_size are taken when ready is high (idle, or in the last
// slot of the current PU, which lets PUs run back to back). Every slot drives
// tag (what the slot is) and either a reference line request or an H-buffer
// column request; the data of both come back one clock later. The slot order is
// this design's choice within the published cycle budget.
module fme_control
  import fme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  pu_size,      // 0: 8x8, 1: 16x16, 2: 32x32, 3: 64x64
  output logic        ready,
  output logic        busy,
  output fme_tag_t    tag,
  output logic        ref_rd_en,
  output logic        ref_rd_col,   // 0: row of the window, 1: column
  output logic [3:0]  ref_rd_idx,   // window row / column 0..15
  output logic        hbuf_rd_en,
  output logic [4:0]  hbuf_rd_col   // phase * 9 + k
);

  typedef enum logic { S_IDLE, S_RUN } state_e;

  state_e     state;
  logic [5:0] cyc;
  logic [2:0] sx, sy, smax;
  logic       first_sub;

  logic last_slot, last_sub, accept;
  assign last_slot = (cyc == 6'(CYC_BLK - 1));
  assign last_sub  = (sx == smax) && (sy == smax);
  assign ready     = (state == S_IDLE) || (last_slot && last_sub);
  assign accept    = start && ready;
  assign busy      = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cyc       <= '0;
      sx        <= '0;
      sy        <= '0;
      smax      <= '0;
      first_sub <= 1'b0;
    end else if (accept) begin
      state     <= S_RUN;
      cyc       <= '0;
      sx        <= '0;
      sy        <= '0;
      smax      <= 3'((1 << pu_size) - 1);
      first_sub <= 1'b1;
    end else if (state == S_RUN) begin
      if (!last_slot) begin
        cyc <= cyc + 6'd1;
      end else begin
        cyc       <= '0;
        first_sub <= 1'b0;
        if (last_sub) begin
          state <= S_IDLE;
        end else if (sx == smax) begin
          sx <= '0;
          sy <= sy + 3'd1;
        end else begin
          sx <= sx + 3'd1;
        end
      end
    end
  end

  // slot decode
  logic [4:0] d;
  always_comb begin
    d           = 5'(cyc - 6'(CYC_H + CYC_V));
    tag         = '0;
    ref_rd_en   = 1'b0;
    ref_rd_col  = 1'b0;
    ref_rd_idx  = '0;
    hbuf_rd_en  = 1'b0;
    hbuf_rd_col = '0;
    if (state == S_RUN) begin
      tag.sub_x    = sx;
      tag.sub_y    = sy;
      tag.pu_first = first_sub;
      tag.pu_last  = last_slot && last_sub;
      if (cyc < 6'(CYC_H)) begin
        tag.phase  = PH_H;
        tag.idx    = cyc[3:0];
        ref_rd_en  = 1'b1;
        ref_rd_idx = cyc[3:0];
      end else if (cyc < 6'(CYC_H + CYC_V)) begin
        tag.phase  = PH_V;
        tag.idx    = 4'(cyc - 6'(CYC_H));
        ref_rd_en  = 1'b1;
        ref_rd_col = 1'b1;
        ref_rd_idx = 4'(cyc - 6'(CYC_H)) + 4'd4;
      end else begin
        tag.phase   = PH_D;
        tag.idx     = 4'(d / 5'd3);
        tag.th      = 2'(d % 5'd3);
        hbuf_rd_en  = 1'b1;
        hbuf_rd_col = 5'(tag.th * 5'd9) + 5'(tag.idx);
      end
    end
  end

endmodule
