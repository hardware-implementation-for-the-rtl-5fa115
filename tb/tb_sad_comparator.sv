// tb_sad_comparator: random sets of 48 candidate SADs plus an IME result, one
// set per clock, some with forced ties and some where the IME result is best.
// The expected winner is found by a linear scan (IME first, then ids 0..47,
// replacing only on a strictly smaller SAD), and must come out six clocks after
// the set, with vector = IME vector + offset of the winner.
module tb_sad_comparator;
  import fme_pkg::*;

  localparam int MVW = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid, frac_win;
  logic [NPOS-1:0][ACC_W-1:0] sad_in;
  logic [ACC_W-1:0] ime_sad, best_sad;
  logic signed [MVW-1:0] ime_mv_x, ime_mv_y, best_mv_x, best_mv_y;
  logic signed [2:0] frac_x, frac_y;

  sad_comparator #(.MV_W(MVW)) dut (.*);

  typedef struct { bit v; int s, fx, fy, mx, my; bit fw; } exp_t;
  exp_t q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; sad_in = '0; ime_sad = '0; ime_mv_x = '0; ime_mv_y = '0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      exp_t e;
      int best, bid;
      in_valid = (n % 5) != 2;
      for (int i = 0; i < NPOS; i++) sad_in[i] = ACC_W'($urandom_range(100, 1000));
      if (n % 3 == 0) begin   // ties at the minimum
        sad_in[$urandom_range(0, 47)] = ACC_W'(50);
        sad_in[$urandom_range(0, 47)] = ACC_W'(50);
      end
      if (n % 11 == 0) sad_in[$urandom_range(0, 47)] = ACC_W'(1048575);
      ime_sad  = ACC_W'((n % 4 == 1) ? 50 : $urandom_range(40, 2000));
      ime_mv_x = MVW'(int'($urandom_range(0, 4000)) - 2000);
      ime_mv_y = MVW'(int'($urandom_range(0, 4000)) - 2000);
      best = int'(ime_sad); bid = -1;
      for (int i = 0; i < NPOS; i++)
        if (int'(sad_in[i]) < best) begin best = int'(sad_in[i]); bid = i; end
      e.v = in_valid; e.s = best; e.fw = (bid >= 0);
      // offset of id: raster over the 7x7 grid without its centre
      e.fx = (bid < 0) ? 0 : (((bid >= 24) ? bid + 1 : bid) % 7) - 3;
      e.fy = (bid < 0) ? 0 : (((bid >= 24) ? bid + 1 : bid) / 7) - 3;
      e.mx = int'(ime_mv_x) + e.fx;
      e.my = int'(ime_mv_y) + e.fy;
      q.push_back(e);
      @(posedge clk); #1;
      if (q.size() > 5) begin
        exp_t x;
        x = q.pop_front();
        checks++;
        if (out_valid != x.v) begin failures++; $display("FAIL valid"); end
        if (x.v) begin
          checks += 4;
          if (int'(best_sad) != x.s) begin failures++; $display("FAIL sad %0d exp %0d", best_sad, x.s); end
          if (int'(frac_x) != x.fx || int'(frac_y) != x.fy) begin
            failures++; $display("FAIL offset (%0d,%0d) exp (%0d,%0d)", frac_x, frac_y, x.fx, x.fy);
          end
          if (int'(best_mv_x) != x.mx || int'(best_mv_y) != x.my) begin failures++; $display("FAIL mv"); end
          if (frac_win != x.fw) begin failures++; $display("FAIL frac_win"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
