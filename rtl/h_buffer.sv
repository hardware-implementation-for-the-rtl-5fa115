// h_buffer: the H-type sample buffer of the FME engine.
//
// It holds the 27 x 16 H-type samples of one 8x8 block (27 columns: nine
// positions x three horizontal phases; 16 rows: the block plus four rows above
// and four below), 10 bits each, signed and unclipped, because clipping before
// the second (vertical) filtering would accumulate error. The H phase writes one
// full row of 27 samples per cycle; the D phase reads one full column of 16
// samples per cycle. A row write and a column read cross the array in different
// directions, so it is built from registers rather than a RAM macro, matching the
// published design's use of no SRAM.
//
// Column numbering: col = phase * 9 + k (phase 0 quarter, 1 half, 2 three-
// quarter; k = 0..8 for positions -1..7). Read data is registered: it appears one
// clock after rd_en, the same latency as the external reference memory.
module h_buffer
  import fme_pkg::*;
(
  input  logic                                clk,
  input  logic                                wr_en,
  input  logic [3:0]                          wr_row,
  input  logic signed [NHCOL-1:0][HBUF_W-1:0] wr_data,
  input  logic                                rd_en,
  input  logic [4:0]                          rd_col,
  output logic signed [WIN-1:0][HBUF_W-1:0]   rd_data
);

  logic signed [HBUF_W-1:0] mem [WIN][NHCOL];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int c = 0; c < NHCOL; c++) mem[wr_row][c] <= wr_data[c];
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      for (int r = 0; r < WIN; r++) rd_data[r] <= mem[r][rd_col];
  end

  always_ff @(posedge clk) begin
    if (rd_en) assert (rd_col < 5'(NHCOL)) else $error("h_buffer: column %0d out of range", rd_col);
  end

endmodule
