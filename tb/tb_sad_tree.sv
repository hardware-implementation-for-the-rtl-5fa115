// tb_sad_tree: random lines (and the all-255 vs all-0 extreme) through one SAD
// tree; the sum of |R - C| and the tag must come out exactly four clocks later.
module tb_sad_tree;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  acc_tag_t tag_in, tag_out;
  logic [BLK-1:0][SAMP_W-1:0] r, c;
  logic [LSAD_W-1:0] sad;

  sad_tree dut (.*);

  typedef struct { int s; acc_tag_t t; } exp_t;
  exp_t q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tag_in = '0; r = '0; c = '0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      exp_t e;
      tag_in.valid = 1'b1;
      tag_in.id    = 6'($urandom_range(0, 47));
      tag_in.load  = 1'($urandom);
      e.s = 0;
      for (int i = 0; i < BLK; i++) begin
        r[i] = (n == 5) ? 8'hFF : 8'($urandom);
        c[i] = (n == 5) ? 8'h00 : 8'($urandom);
        e.s += (r[i] > c[i]) ? int'(r[i]) - int'(c[i]) : int'(c[i]) - int'(r[i]);
      end
      e.t = tag_in;
      q.push_back(e);
      @(posedge clk); #1;
      if (q.size() > 3) begin
        exp_t x;
        x = q.pop_front();
        checks += 2;
        if (int'(sad) != x.s) begin failures++; $display("FAIL sad %0d exp %0d", sad, x.s); end
        if (tag_out != x.t) begin failures++; $display("FAIL tag"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
