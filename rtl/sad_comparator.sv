// sad_comparator: picks the best of the 48 fractional candidates and the
// integer-search (IME) result.
//
// A six-stage pipelined tournament of 48 two-input comparators, each keeping the
// smaller SAD and its candidate id: 48 -> 24 -> 12 -> 6 -> 3 in stages 1 to 4;
// in stage 5 the IME result joins as a fourth entry (3 + 1 -> 2); stage 6 gives
// the winner. Comparators are 24 + 12 + 6 + 3 + 2 + 1 = 48.
//
// Ties keep the left entry, which is the lower id, and the IME result is placed
// left in stage 5, so a fractional vector must be strictly better to replace the
// integer one, and among equal fractional SADs the lowest id wins. The winner's
// vector is the IME vector plus the candidate's quarter-sample offset.
//
// Interface: in_valid with sad_in[0..47], ime_sad and ime_mv (quarter-sample
// units) sampled together; out_valid six clocks later with best_sad, best_mv,
// the offset (frac_x, frac_y, both 0 when the IME result wins) and frac_win.
// A new set may enter every clock.
module sad_comparator
  import fme_pkg::*;
#(
  parameter int MV_W = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [NPOS-1:0][ACC_W-1:0]        sad_in,
  input  logic [ACC_W-1:0]                  ime_sad,
  input  logic signed [MV_W-1:0]            ime_mv_x,
  input  logic signed [MV_W-1:0]            ime_mv_y,
  output logic                              out_valid,
  output logic [ACC_W-1:0]                  best_sad,
  output logic signed [MV_W-1:0]            best_mv_x,
  output logic signed [MV_W-1:0]            best_mv_y,
  output logic signed [2:0]                 frac_x,
  output logic signed [2:0]                 frac_y,
  output logic                              frac_win
);

  typedef struct packed {
    logic [ACC_W-1:0] sad;
    logic [5:0]       id;
    logic             ime;   // entry is the IME result
  } cand_t;

  typedef struct packed {
    logic [ACC_W-1:0]       sad;
    logic signed [MV_W-1:0] mx;
    logic signed [MV_W-1:0] my;
  } ime_t;

  // after stage 4 the IME SAD is in the tournament; only its vector travels on
  typedef struct packed {
    logic signed [MV_W-1:0] mx;
    logic signed [MV_W-1:0] my;
  } mv_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.sad < a.sad) ? b : a;
  endfunction

  cand_t s1 [24];
  cand_t s2 [12];
  cand_t s3 [6];
  cand_t s4 [3];
  cand_t s5 [2];
  cand_t s6;
  ime_t  im1, im2, im3, im4;
  mv_t   im5, im6;
  logic [5:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[4:0], in_valid};
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 24; i++)
      s1[i] <= pick('{sad: sad_in[2*i],   id: 6'(2*i),   ime: 1'b0},
                    '{sad: sad_in[2*i+1], id: 6'(2*i+1), ime: 1'b0});
    im1 <= '{sad: ime_sad, mx: ime_mv_x, my: ime_mv_y};
    for (int i = 0; i < 12; i++) s2[i] <= pick(s1[2*i], s1[2*i+1]);
    im2 <= im1;
    for (int i = 0; i < 6; i++)  s3[i] <= pick(s2[2*i], s2[2*i+1]);
    im3 <= im2;
    for (int i = 0; i < 3; i++)  s4[i] <= pick(s3[2*i], s3[2*i+1]);
    im4 <= im3;
    s5[0] <= pick('{sad: im4.sad, id: 6'd0, ime: 1'b1}, s4[0]);
    s5[1] <= pick(s4[1], s4[2]);
    im5 <= '{mx: im4.mx, my: im4.my};
    s6  <= pick(s5[0], s5[1]);
    im6 <= im5;
  end

  always_comb begin
    out_valid = vpipe[5];
    best_sad  = s6.sad;
    frac_win  = !s6.ime;
    frac_x    = s6.ime ? 3'sd0 : 3'(off_x(int'(s6.id)));
    frac_y    = s6.ime ? 3'sd0 : 3'(off_y(int'(s6.id)));
    best_mv_x = im6.mx + MV_W'(frac_x);
    best_mv_y = im6.my + MV_W'(frac_y);
  end

endmodule
