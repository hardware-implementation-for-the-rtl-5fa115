// sad_accumulator: the 48 SAD accumulators of the search-and-comparison unit.
//
// Each of the 48 fractional candidates owns one 20-bit accumulator that is
// wired to one fixed SAD tree (fme_pkg::tree_of); it adds the tree's line SAD
// whenever that tree's tag names its candidate. So in any cycle at most twelve
// accumulators are active. A tag with load set starts a new PU: the accumulator
// takes the line SAD instead of adding it. Accumulation continues over all 8x8
// sub-blocks of a PU, so the SAD of a 16x16, 32x32 or 64x64 PU is assembled from
// its 8x8 pieces; 20 bits hold a 64x64 SAD (4096 x 255).
//
// Timing: an update is visible one clock after the tree output. last_in marks
// the final line of a PU; done pulses on the next clock, when all 48 sums in acc
// are final. They stay stable until the next PU's first line arrives.
module sad_accumulator
  import fme_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NTREE-1:0][LSAD_W-1:0]      sad,
  input  acc_tag_t [NTREE-1:0]              atag,
  input  logic                              last_in,
  output logic [NPOS-1:0][ACC_W-1:0]        acc,
  output logic                              done
);

  for (genvar b = 0; b < NPOS; b++) begin : g_acc
    localparam int TR = tree_of(b);
    logic hit;
    assign hit = atag[TR].valid && (atag[TR].id == 6'(b));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)             acc[b] <= '0;
      else if (hit) begin
        if (atag[TR].load)    acc[b] <= ACC_W'(sad[TR]);
        else                  acc[b] <= acc[b] + ACC_W'(sad[TR]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= last_in;
  end

endmodule
