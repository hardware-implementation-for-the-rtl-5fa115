// filter_bank: the interpolation filters of the FME engine, three sets of nine
// units each (9 Up, 9 Middle, 9 Down), producing 27 fractional samples per cycle.
//
// The 16 inputs are one line of the interpolation window (a row or a column,
// window positions -4..11). Filter k of each set (k = 0..8) takes inputs k..k+7
// and so produces the sample at position k-1, i.e. positions -1..7: every
// fractional sample of the 8-sample line that any of the 48 candidate blocks
// needs. Up gives the quarter, Middle the half, Down the three-quarter phase.
//
// Timing: outputs three clocks after the inputs; out_valid follows in_valid. The
// filter registers are enabled only while a valid line is in the pipeline.
module filter_bank
  import fme_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  logic signed [WIN-1:0][FIN_W-1:0]      s,
  output logic                                  out_valid,
  output logic signed [NFILT-1:0][UD_W-1:0]     up,
  output logic signed [NFILT-1:0][MID_W-1:0]    mid,
  output logic signed [NFILT-1:0][UD_W-1:0]     down
);

  logic [2:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[1:0], in_valid};
  end
  assign out_valid = vpipe[2];

  // enable while any stage holds valid data
  logic en;
  assign en = in_valid | vpipe[0] | vpipe[1];

  for (genvar k = 0; k < NFILT; k++) begin : g_filt
    logic signed [7:0][FIN_W-1:0] taps;
    assign taps = s[k+7:k];
    fir_up_down #(.DOWN(1'b0)) u_up   (.clk, .en, .s(taps), .y(up[k]));
    fir_middle                 u_mid  (.clk, .en, .s(taps), .y(mid[k]));
    fir_up_down #(.DOWN(1'b1)) u_down (.clk, .en, .s(taps), .y(down[k]));
  end

endmodule
