// fir_middle: HEVC 8-tap luma interpolation filter for the half-sample position
// ("Middle" filter, coefficients -1 4 -11 40 40 -11 4 -1).
//
// The coefficient set is symmetric, so the taps are first added in mirrored
// pairs (stage 1); the pair sums are then scaled with shifts and adds only,
// 40x = 32x + 8x and 11x = 8x + 2x + x (stage 2); stage 3 adds the two partial
// sums and divides by 64 with round-half-up, (sum + 32) >>> 6.
//
// Interface: s[0..7] are 10-bit signed taps, en the stage enable (register
// enables stand for clock gating), y the 11-bit signed result three enabled
// clocks later. With 8-bit integer inputs the result lies in -96..351, which the
// 10-bit H-type buffer holds; with H-type inputs it needs the full 11 bits.
module fir_middle
  import fme_pkg::*;
(
  input  logic                           clk,
  input  logic                           en,
  input  logic signed [7:0][FIN_W-1:0]   s,
  output logic signed [MID_W-1:0]        y
);

  localparam int W = 18;

  logic signed [W-1:0] t [8];
  always_comb begin
    for (int i = 0; i < 8; i++) t[i] = W'(signed'(s[i]));
  end

  // stage 1: mirrored pair sums
  logic signed [W-1:0] p40, p11, p4, p1;
  always_ff @(posedge clk) begin
    if (en) begin
      p40 <= t[3] + t[4];
      p11 <= t[2] + t[5];
      p4  <= t[1] + t[6];
      p1  <= t[0] + t[7];
    end
  end

  // stage 2: shift-add scaling
  logic signed [W-1:0] q0, q1;
  always_ff @(posedge clk) begin
    if (en) begin
      q0 <= (p40 <<< 5) + (p40 <<< 3);
      q1 <= (p4 <<< 2) - p1 - ((p11 <<< 3) + (p11 <<< 1) + p11);
    end
  end

  // stage 3: rounding and scaling
  logic signed [W-1:0] sum;
  assign sum = q0 + q1 + W'(32);
  always_ff @(posedge clk) begin
    if (en) y <= MID_W'(sum >>> 6);
  end

endmodule
