// tb_fme_control: starts PUs of every size, some back to back, and checks
// every issue slot against the expected schedule: per 8x8 sub-block (raster
// order) 16 H slots reading window rows 0..15, 8 V slots reading window
// columns 4..11, 27 D slots reading H-buffer column th*9+k in groups of three;
// pu_first on the first sub-block, pu_last on the final slot, ready only when
// idle or in the final slot. It also checks the 51-cycle block period and
// 204 cycles for a 16x16 PU.
module tb_fme_control;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, ready, busy, ref_rd_en, ref_rd_col, hbuf_rd_en;
  logic [1:0] pu_size;
  fme_tag_t tag;
  logic [3:0] ref_rd_idx;
  logic [4:0] hbuf_rd_col;

  fme_control dut (.*);

  task automatic expect_slot(int sx, int sy, int s, bit first, bit last);
    bit ok;
    ok = 1;
    if (s < 16) begin
      ok &= tag.phase == PH_H && int'(tag.idx) == s && ref_rd_en && !ref_rd_col
            && int'(ref_rd_idx) == s && !hbuf_rd_en;
    end else if (s < 24) begin
      ok &= tag.phase == PH_V && int'(tag.idx) == s - 16 && ref_rd_en && ref_rd_col
            && int'(ref_rd_idx) == s - 12 && !hbuf_rd_en;
    end else begin
      int d = s - 24;
      ok &= tag.phase == PH_D && int'(tag.idx) == d / 3 && int'(tag.th) == d % 3 && !ref_rd_en
            && hbuf_rd_en && int'(hbuf_rd_col) == (d % 3) * 9 + d / 3;
    end
    ok &= int'(tag.sub_x) == sx && int'(tag.sub_y) == sy && tag.pu_first == first && tag.pu_last == last;
    ok &= ready == last;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL sub (%0d,%0d) slot %0d: phase %0d idx %0d th %0d first %0d last %0d ready %0d",
               sx, sy, s, tag.phase, tag.idx, tag.th, tag.pu_first, tag.pu_last, ready);
    end
  endtask

  // run one PU from the clock after it is accepted; start the next one in its last slot
  task automatic run_pu(int size, bit next_b2b, int next_size, output int cycles);
    int n;
    n = 1 << size;
    cycles = 0;
    for (int sy = 0; sy < n; sy++)
      for (int sx = 0; sx < n; sx++)
        for (int s = 0; s < CYC_BLK; s++) begin
          bit last;
          last = (sx == n - 1) && (sy == n - 1) && (s == CYC_BLK - 1);
          #1;
          start = 1'b0;
          expect_slot(sx, sy, s, (sx == 0) && (sy == 0), last);
          if (last && next_b2b) begin start = 1'b1; pu_size = 2'(next_size); end
          @(posedge clk);
          cycles++;
        end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 1'b0; pu_size = '0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (!ready || busy || tag.phase != PH_NONE) begin failures++; $display("FAIL idle"); end
    // 8x8, then back-to-back 8x8, 16x16, then idle gap, 32x32, 64x64
    start = 1'b1; pu_size = 2'd0;
    @(posedge clk);
    run_pu(0, 1, 0, cyc);
    checks++; if (cyc != 51) begin failures++; $display("FAIL 8x8 took %0d", cyc); end
    run_pu(0, 1, 1, cyc);
    run_pu(1, 0, 0, cyc);
    checks++; if (cyc != 204) begin failures++; $display("FAIL 16x16 took %0d", cyc); end
    #1;
    checks++;
    if (!ready || busy) begin failures++; $display("FAIL not idle after PU"); end
    repeat (3) @(posedge clk);
    #1 start = 1'b1; pu_size = 2'd2;
    @(posedge clk);
    run_pu(2, 1, 3, cyc);
    checks++; if (cyc != 816) begin failures++; $display("FAIL 32x32 took %0d", cyc); end
    run_pu(3, 0, 0, cyc);
    checks++; if (cyc != 3264) begin failures++; $display("FAIL 64x64 took %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
