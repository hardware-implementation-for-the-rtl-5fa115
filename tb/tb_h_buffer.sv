// tb_h_buffer: writes 16 random rows of 27 signed 10-bit samples, then reads all
// 27 columns and checks each column against the rows written (transposition),
// with one clock of read latency. A second pass overwrites half the rows and
// interleaves reads to check that reads see the latest completed writes.
module tb_h_buffer;
  import fme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en;
  logic [3:0] wr_row;
  logic [4:0] rd_col;
  logic signed [NHCOL-1:0][HBUF_W-1:0] wr_data;
  logic signed [WIN-1:0][HBUF_W-1:0] rd_data;

  h_buffer dut (.*);

  int model [WIN][NHCOL];

  task automatic write_row(int r);
    wr_en = 1'b1; wr_row = 4'(r);
    for (int c = 0; c < NHCOL; c++) begin
      model[r][c] = int'($urandom_range(0, 447)) - 96;
      wr_data[c] = HBUF_W'(model[r][c]);
    end
    @(posedge clk); #1;
    wr_en = 1'b0;
  endtask

  task automatic read_col(int c);
    rd_en = 1'b1; rd_col = 5'(c);
    @(posedge clk); #1;
    rd_en = 1'b0;
    for (int r = 0; r < WIN; r++) begin
      checks++;
      if (int'(signed'(rd_data[r])) != model[r][c]) begin
        failures++; $display("FAIL col %0d row %0d: %0d exp %0d", c, r, signed'(rd_data[r]), model[r][c]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; wr_row = '0; rd_col = '0; wr_data = '0;
    @(posedge clk); #1;
    for (int r = 0; r < WIN; r++) write_row(r);
    for (int c = 0; c < NHCOL; c++) read_col(c);
    for (int r = 0; r < WIN; r += 2) begin
      write_row(r);
      read_col(int'($urandom_range(0, NHCOL - 1)));
    end
    for (int c = NHCOL - 1; c >= 0; c--) read_col(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
