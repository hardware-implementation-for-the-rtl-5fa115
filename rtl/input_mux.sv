// input_mux: chooses the 16 samples that enter the filter bank.
//
// During the H and V phases the filters read integer samples from the external
// reference memory (8-bit, unsigned: zero-extended to the 10-bit signed filter
// input). During the D phase they read a column of previously computed H-type
// samples from the H-type buffer (already 10-bit signed, unclipped).
//
// Purely combinational; sel_hbuf comes from the pipeline tag of the same stage.
module input_mux
  import fme_pkg::*;
(
  input  logic                              sel_hbuf,
  input  logic        [WIN-1:0][SAMP_W-1:0] ref_line,
  input  logic signed [WIN-1:0][HBUF_W-1:0] hbuf_col,
  output logic signed [WIN-1:0][FIN_W-1:0]  s
);

  always_comb begin
    for (int i = 0; i < WIN; i++)
      s[i] = sel_hbuf ? FIN_W'(hbuf_col[i]) : FIN_W'({2'b00, ref_line[i]});
  end

endmodule
