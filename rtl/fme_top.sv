// fme_top: HEVC fractional motion estimation (FME) engine for square PUs.
//
// Given the best integer motion vector of a PU (8x8 up to 64x64), the engine
// interpolates every half- and quarter-sample position around it with the HEVC
// 8-tap luma filters and evaluates all 48 fractional candidate blocks
// (offsets -3/4..+3/4 in both directions) by full search, returning the best
// vector and its SAD, or the integer vector if no candidate beats it.
//
// Datapath (one 8x8 sub-block every 51 cycles, larger PUs as 8x8 pieces):
//   fme_control -> [reference memory | h_buffer] -> input_mux -> filter_bank
//   (9 Up, 9 Middle, 9 Down filters, 27 samples/cycle) -> h_buffer (H rows,
//   unclipped) and clip8 x27 -> sad_trees (12 trees) -> sad_accumulator (48)
//   -> sad_comparator (6 stages, joined by the IME result).
//
// Pipeline, counted from the issue slot s of fme_control:
//   s+0  reference line or H-buffer column requested
//   s+1  data arrive, input mux; filter stage 1
//   s+3  current-block line requested (arrives at s+4)
//   s+4  filter result: H rows written to the H buffer; clipped samples and
//        current line enter the SAD trees
//   s+8  line SADs; s+9 accumulated; s+15 comparator result.
// For an 8x8 PU res_valid is set by the 65th rising edge after the one that
// takes start; further PUs follow every 51 x (number of 8x8 sub-blocks) clocks.
//
// External memories (reference window and current block) are outside the engine.
// Both answer a read one clock after the request with a full line:
//   ref: 16 samples of window row / column ref_rd_idx (window coordinate 0..15 =
//        sub-block coordinate -4..11) of sub-block (ref_rd_sub_x, ref_rd_sub_y);
//   cur: 8 samples of row / column cur_rd_idx of that sub-block of the current PU.
// Motion vectors are in quarter-sample units; the IME vector and SAD are taken
// with start. Register enables on idle stages stand for the clock gating of the
// published design.
module fme_top
  import fme_pkg::*;
#(
  parameter int MV_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // PU request from the integer search
  input  logic                          start,
  output logic                          ready,
  output logic                          busy,
  input  logic [1:0]                    pu_size,
  input  logic signed [MV_W-1:0]        ime_mv_x,
  input  logic signed [MV_W-1:0]        ime_mv_y,
  input  logic [ACC_W-1:0]              ime_sad,
  // reference memory
  output logic                          ref_rd_en,
  output logic                          ref_rd_col,
  output logic [3:0]                    ref_rd_idx,
  output logic [2:0]                    ref_rd_sub_x,
  output logic [2:0]                    ref_rd_sub_y,
  input  logic [WIN-1:0][SAMP_W-1:0]    ref_line,
  // current-block memory
  output logic                          cur_rd_en,
  output logic                          cur_rd_col,
  output logic [2:0]                    cur_rd_idx,
  output logic [2:0]                    cur_rd_sub_x,
  output logic [2:0]                    cur_rd_sub_y,
  input  logic [BLK-1:0][SAMP_W-1:0]    cur_line,
  // result
  output logic                          res_valid,
  output logic [ACC_W-1:0]              res_sad,
  output logic signed [MV_W-1:0]        res_mv_x,
  output logic signed [MV_W-1:0]        res_mv_y,
  output logic signed [2:0]             res_frac_x,
  output logic signed [2:0]             res_frac_y,
  output logic                          res_frac_win
);

  // ---------------------------------------------------------------- control
  fme_tag_t   tag0;
  logic       hbuf_rd_en;
  logic [4:0] hbuf_rd_col;

  fme_control u_ctrl (
    .clk, .rst_n, .start, .pu_size, .ready, .busy,
    .tag        (tag0),
    .ref_rd_en, .ref_rd_col, .ref_rd_idx,
    .hbuf_rd_en, .hbuf_rd_col
  );
  assign ref_rd_sub_x = tag0.sub_x;
  assign ref_rd_sub_y = tag0.sub_y;

  // IME result of the PU in flight: captured with start, handed to the
  // comparator side at the PU's last slot (before the next PU can overwrite it)
  logic [ACC_W-1:0]       ime_sad_q,  ime_sad_h;
  logic signed [MV_W-1:0] ime_mx_q, ime_my_q, ime_mx_h, ime_my_h;
  always_ff @(posedge clk) begin
    if (tag0.phase != PH_NONE && tag0.pu_last) begin
      ime_sad_h <= ime_sad_q;
      ime_mx_h  <= ime_mx_q;
      ime_my_h  <= ime_my_q;
    end
    if (start && ready) begin
      ime_sad_q <= ime_sad;
      ime_mx_q  <= ime_mv_x;
      ime_my_q  <= ime_mv_y;
    end
  end

  // ---------------------------------------------------------------- tag pipe
  fme_tag_t tag1, tag2, tag3, tag4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0; tag4 <= '0;
    end else begin
      tag1 <= tag0; tag2 <= tag1; tag3 <= tag2; tag4 <= tag3;
    end
  end

  // ---------------------------------------------------------------- interpolation
  logic signed [WIN-1:0][HBUF_W-1:0]   hbuf_col;
  logic signed [WIN-1:0][FIN_W-1:0]    fin;
  logic signed [NHCOL-1:0][HBUF_W-1:0] hrow;
  logic signed [NFILT-1:0][UD_W-1:0]   f_up, f_down;
  logic signed [NFILT-1:0][MID_W-1:0]  f_mid;
  logic                                fb_valid;

  input_mux u_mux (
    .sel_hbuf (tag1.phase == PH_D),
    .ref_line,
    .hbuf_col,
    .s        (fin)
  );

  filter_bank u_filters (
    .clk, .rst_n,
    .in_valid (tag1.phase != PH_NONE),
    .s        (fin),
    .out_valid(fb_valid),
    .up       (f_up),
    .mid      (f_mid),
    .down     (f_down)
  );

  // an H row holds values in -96..351 (10 bits) whatever the filter type
  always_comb begin
    for (int k = 0; k < NFILT; k++) begin
      hrow[k]             = f_up[k];
      hrow[NFILT + k]     = HBUF_W'(f_mid[k]);
      hrow[2 * NFILT + k] = f_down[k];
    end
  end

  h_buffer u_hbuf (
    .clk,
    .wr_en   (fb_valid && tag4.phase == PH_H),
    .wr_row  (tag4.idx),
    .wr_data (hrow),
    .rd_en   (hbuf_rd_en),
    .rd_col  (hbuf_rd_col),
    .rd_data (hbuf_col)
  );

  // ---------------------------------------------------------------- clip
  logic [NPHASE-1:0][NFILT-1:0][SAMP_W-1:0] fclip;
  for (genvar k = 0; k < NFILT; k++) begin : g_clip
    clip8 #(.IN_W(UD_W))  u_c_up   (.x(f_up[k]),   .y(fclip[0][k]));
    clip8 #(.IN_W(MID_W)) u_c_mid  (.x(f_mid[k]),  .y(fclip[1][k]));
    clip8 #(.IN_W(UD_W))  u_c_down (.x(f_down[k]), .y(fclip[2][k]));
  end

  // ---------------------------------------------------------------- current block
  // requested at stage 3 so that the line arrives together with the filter output
  always_comb begin
    cur_rd_en    = 1'b0;
    cur_rd_col   = 1'b0;
    cur_rd_idx   = '0;
    cur_rd_sub_x = tag3.sub_x;
    cur_rd_sub_y = tag3.sub_y;
    unique case (tag3.phase)
      PH_H: begin
        cur_rd_en  = (tag3.idx >= 4'd4) && (tag3.idx <= 4'd11);
        cur_rd_idx = 3'(tag3.idx - 4'd4);
      end
      PH_V: begin
        cur_rd_en  = 1'b1;
        cur_rd_col = 1'b1;
        cur_rd_idx = tag3.idx[2:0];
      end
      PH_D: begin
        // column x+1 of the H column at x = idx-1
        cur_rd_en  = (tag3.idx <= 4'd7);
        cur_rd_col = 1'b1;
        cur_rd_idx = tag3.idx[2:0];
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- search and comparison
  logic [NTREE-1:0][LSAD_W-1:0] lsad;
  acc_tag_t [NTREE-1:0]         atag;
  logic                         last_line;
  logic [NPOS-1:0][ACC_W-1:0]   acc;
  logic                         acc_done;

  sad_trees u_trees (
    .clk, .rst_n,
    .tag     (tag4),
    .f       (fclip),
    .cur_line,
    .sad     (lsad),
    .atag,
    .last_out(last_line)
  );

  sad_accumulator u_acc (
    .clk, .rst_n,
    .sad     (lsad),
    .atag,
    .last_in (last_line),
    .acc,
    .done    (acc_done)
  );

  sad_comparator #(.MV_W(MV_W)) u_cmp (
    .clk, .rst_n,
    .in_valid (acc_done),
    .sad_in   (acc),
    .ime_sad  (ime_sad_h),
    .ime_mv_x (ime_mx_h),
    .ime_mv_y (ime_my_h),
    .out_valid(res_valid),
    .best_sad (res_sad),
    .best_mv_x(res_mv_x),
    .best_mv_y(res_mv_y),
    .frac_x   (res_frac_x),
    .frac_y   (res_frac_y),
    .frac_win (res_frac_win)
  );

endmodule
