// clip8: saturates a signed filter output to the 8-bit sample range 0..255.
//
// Negative values become 0, values above 255 become 255, the rest pass
// unchanged. The FME engine clips every fractional sample just before the SAD
// trees (never before the H-type buffer). Combinational.
module clip8
  import fme_pkg::*;
#(
  parameter int IN_W = MID_W
) (
  input  logic signed [IN_W-1:0]  x,
  output logic        [SAMP_W-1:0] y
);

  always_comb begin
    if (x < 0)                          y = '0;
    else if (x > 255)                   y = 8'hFF;
    else                                y = x[SAMP_W-1:0];
  end

endmodule
