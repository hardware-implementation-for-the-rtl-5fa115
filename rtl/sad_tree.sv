// sad_tree: sum of absolute differences of one 8-sample line.
//
// The eight fractional reference samples R0..R7 are compared with the eight
// integer samples C0..C7 of the current block at the same positions. Stage 1
// registers the absolute differences; stages 2 to 4 form an adder tree
// (8 -> 4 -> 2 -> 1), giving four pipeline stages and one line (a row or a
// column of the 8x8 block) per clock.
//
// Interface: tag_in travels alongside the data and comes out with the SAD four
// clocks later (tag_out), so the accumulator knows which candidate block the
// line belongs to. sad is 11 bits (at most 8 x 255).
module sad_tree
  import fme_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  acc_tag_t                      tag_in,
  input  logic [BLK-1:0][SAMP_W-1:0]    r,
  input  logic [BLK-1:0][SAMP_W-1:0]    c,
  output acc_tag_t                      tag_out,
  output logic [LSAD_W-1:0]             sad
);

  acc_tag_t tag1, tag2, tag3;
  logic [SAMP_W-1:0] d1 [8];
  logic [8:0]        s2 [4];
  logic [9:0]        s3 [2];

  // tags: reset so that no spurious update reaches the accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0; tag_out <= '0;
    end else begin
      tag1 <= tag_in; tag2 <= tag1; tag3 <= tag2; tag_out <= tag3;
    end
  end

  // data registers load only when a valid line is present (clock-gating enable)
  always_ff @(posedge clk) begin
    if (tag_in.valid)
      for (int i = 0; i < 8; i++)
        d1[i] <= (r[i] > c[i]) ? r[i] - c[i] : c[i] - r[i];
    if (tag1.valid)
      for (int i = 0; i < 4; i++) s2[i] <= 9'(d1[2*i]) + 9'(d1[2*i+1]);
    if (tag2.valid)
      for (int i = 0; i < 2; i++) s3[i] <= 10'(s2[2*i]) + 10'(s2[2*i+1]);
    if (tag3.valid)
      sad <= 11'(s3[0]) + 11'(s3[1]);
  end

endmodule
