// fir_up_down: HEVC 8-tap luma interpolation filter for the quarter ("Up",
// coefficients -1 4 -10 58 17 -5 1 0) and three-quarter ("Down", the same set in
// reverse order) positions.
//
// One architecture serves both: the Down filter is the Up filter with its inputs
// taken in reverse order (parameter DOWN). The products are built with shifts and
// adds only (58x = 64x - 4x - 2x, 17x = 16x + x, 10x = 8x + 2x, 5x = 4x + x), in
// three pipeline stages: partial products, two partial sums, final sum with
// rounding. The result is divided by 64 with round-half-up, (sum + 32) >>> 6, so
// that the shift replaces the division without a bias.
//
// Interface: s[0..7] are 10-bit signed taps (integer samples zero-extended, or
// previously computed H-type samples). en is the stage enable (register enables
// stand for the clock gating of the published design). y is the 10-bit signed
// result, valid three enabled clocks after the inputs.
module fir_up_down
  import fme_pkg::*;
#(
  parameter bit DOWN = 1'b0
) (
  input  logic                           clk,
  input  logic                           en,
  input  logic signed [7:0][FIN_W-1:0]   s,
  output logic signed [UD_W-1:0]         y
);

  localparam int W = 18;

  // tap i of the Up orientation
  logic signed [W-1:0] t [8];
  always_comb begin
    for (int i = 0; i < 8; i++)
      t[i] = W'(signed'(DOWN ? s[7-i] : s[i]));
  end

  // stage 1: shift-add products
  logic signed [W-1:0] p58, p17, p4m1, pneg;
  always_ff @(posedge clk) begin
    if (en) begin
      p58  <= (t[3] <<< 6) - (t[3] <<< 2) - (t[3] <<< 1);
      p17  <= (t[4] <<< 4) + t[4];
      p4m1 <= (t[1] <<< 2) - t[0] + t[6];
      pneg <= -((t[2] <<< 3) + (t[2] <<< 1)) - ((t[5] <<< 2) + t[5]);
    end
  end

  // stage 2: two partial sums
  logic signed [W-1:0] q0, q1;
  always_ff @(posedge clk) begin
    if (en) begin
      q0 <= p58 + p17;
      q1 <= p4m1 + pneg;
    end
  end

  // stage 3: rounding and scaling
  logic signed [W-1:0] sum;
  assign sum = q0 + q1 + W'(32);
  always_ff @(posedge clk) begin
    if (en) y <= UD_W'(sum >>> 6);
  end

endmodule
