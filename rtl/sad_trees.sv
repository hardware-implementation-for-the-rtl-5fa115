// sad_trees: the twelve SAD tree units of the search-and-comparison unit, with
// the routing that decides, for every cycle of the block schedule, which eight
// fractional samples and which current-block line each tree compares.
//
// Inputs per cycle are the 27 clipped fractional samples of one line (f[p][k]:
// phase p = quarter/half/three-quarter, k = 0..8 for positions -1..7), the
// current-block line fetched for this slot (cur_line) and the slot's tag.
// An 8-sample candidate line is either k = 1..8 (positive offset) or k = 0..7
// (negative offset: position x - 3/4 equals position (x - 1) + 1/4).
//
//   H slot, window row 4..11 (block row y = 0..7): trees 2p / 2p+1 take phase p,
//     candidates (dx = p+1, 0) and (dx = p-3, 0); cur_line is row y.
//   V slot, block column x: same trees for candidates (0, dy = p+1) / (0, p-3);
//     cur_line is column x.
//   D slot, H column of phase th at position x = k-1 (k = idx): 27 outputs are
//     the three vertical phases over rows -1..7 of that column. Candidates with
//     dx = th+1 (trees 0..5) use it as their column x and compare with current
//     column x; candidates with dx = th-3 (trees 6..11) use it as their column
//     x+1 and compare with current column x+1. The slot's cur_line is column x+1;
//     column x is the one fetched in the previous group of three D slots, held in
//     cur_lo. So only eight current samples are fetched per cycle.
//
// The tree for each candidate is fixed (fme_pkg::tree_of), so each accumulator
// listens to one tree. load marks the first line of a PU's first sub-block.
// Outputs appear four clocks after the inputs; last_out is tag.pu_last delayed
// to match.
module sad_trees
  import fme_pkg::*;
(
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  fme_tag_t                                   tag,
  input  logic [NPHASE-1:0][NFILT-1:0][SAMP_W-1:0]   f,
  input  logic [BLK-1:0][SAMP_W-1:0]                 cur_line,
  output logic [NTREE-1:0][LSAD_W-1:0]               sad,
  output acc_tag_t [NTREE-1:0]                       atag,
  output logic                                       last_out
);

  // current column x of the D phase, captured at the last slot of each group
  logic [BLK-1:0][SAMP_W-1:0] cur_lo;
  always_ff @(posedge clk) begin
    if (tag.phase == PH_D && tag.th == 2'd2) cur_lo <= cur_line;
  end

  acc_tag_t [NTREE-1:0]                   tin;
  logic [NTREE-1:0][BLK-1:0][SAMP_W-1:0]  rin;
  logic [NTREE-1:0][BLK-1:0][SAMP_W-1:0]  cin;

  // line of the H and V phases: block row (H, window rows 4..11) or column (V)
  logic       hv_use;
  logic [2:0] hv_line;
  assign hv_use  = (tag.phase == PH_V) || (tag.idx >= 4'd4 && tag.idx <= 4'd11);
  assign hv_line = (tag.phase == PH_V) ? tag.idx[2:0] : 3'(tag.idx - 4'd4);

  // Tree tr serves phase P = (tr % 6) / 2 on side S = tr % 2 (0: positive offset,
  // samples k = 1..8; 1: negative offset, k = 0..7). In the H and V phases P is
  // the horizontal / vertical phase; in the D phase P is the vertical phase and
  // H = tr / 6 says whether dx is positive (0) or negative (1). The sample
  // selection is therefore the same in every phase; only ids and the current
  // line change.
  for (genvar tr = 0; tr < NTREE; tr++) begin : g_route
    localparam int P  = (tr % 6) / 2;
    localparam int S  = tr % 2;
    localparam int H  = tr / 6;
    localparam int D1 = (S == 0) ? P + 1 : P - 3;                     // own-phase offset
    localparam logic [5:0] ID_H  = (tr < 6) ? blk_id(D1, 0) : 6'd0;
    localparam logic [5:0] ID_V  = (tr < 6) ? blk_id(0, D1) : 6'd0;
    localparam logic [5:0] ID_D0 = blk_id((H == 0) ? 1 : -3, D1);    // th = 0
    localparam logic [5:0] ID_D1 = blk_id((H == 0) ? 2 : -2, D1);    // th = 1
    localparam logic [5:0] ID_D2 = blk_id((H == 0) ? 3 : -1, D1);    // th = 2

    for (genvar i = 0; i < BLK; i++) begin : g_smp
      assign rin[tr][i] = f[P][(S == 0) ? i + 1 : i];
    end

    logic d_use, d_load;
    // positive dx needs H column x >= 0 (k >= 1), negative dx x <= 6 (k <= 7)
    assign d_use  = (H == 0) ? (tag.idx >= 4'd1) : (tag.idx <= 4'd7);
    assign d_load = (H == 0) ? (tag.idx == 4'd1) : (tag.idx == 4'd0);

    always_comb begin
      tin[tr] = '0;
      cin[tr] = cur_line;
      unique case (tag.phase)
        PH_H: begin
          tin[tr].valid = (tr < 6) && hv_use;
          tin[tr].id    = ID_H;
          tin[tr].load  = tag.pu_first && hv_line == 3'd0;
        end
        PH_V: begin
          tin[tr].valid = (tr < 6);
          tin[tr].id    = ID_V;
          tin[tr].load  = tag.pu_first && hv_line == 3'd0;
        end
        PH_D: begin
          tin[tr].valid = d_use;
          tin[tr].id    = (tag.th == 2'd0) ? ID_D0 : (tag.th == 2'd1) ? ID_D1 : ID_D2;
          tin[tr].load  = tag.pu_first && d_load;
          if (H == 0) cin[tr] = cur_lo;
        end
        default: ;
      endcase
    end
  end

  for (genvar t = 0; t < NTREE; t++) begin : g_tree
    sad_tree u_tree (
      .clk, .rst_n,
      .tag_in (tin[t]),
      .r      (rin[t]),
      .c      (cin[t]),
      .tag_out(atag[t]),
      .sad    (sad[t])
    );
  end

  logic [3:0] lpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lpipe <= '0;
    else        lpipe <= {lpipe[2:0], (tag.phase != PH_NONE) && tag.pu_last};
  end
  assign last_out = lpipe[3];

endmodule
