// tb_filter_bank: drives random 16-sample lines into the 27-filter bank and
// checks every output: set p (Up/Middle/Down), unit k must equal the HEVC
// filter of phase p over inputs k..k+7, three clocks later, with out_valid
// following in_valid. Lines come both as integer samples and as H-type values.
module tb_filter_bank;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  logic signed [WIN-1:0][FIN_W-1:0] s;
  logic signed [NFILT-1:0][UD_W-1:0] up, down;
  logic signed [NFILT-1:0][MID_W-1:0] mid;

  filter_bank dut (.*);

  const int coef [3][8] = '{'{-1, 4, -10, 58, 17, -5, 1, 0},
                            '{-1, 4, -11, 40, 40, -11, 4, -1},
                            '{0, 1, -5, 17, 58, -10, 4, -1}};

  typedef struct { int v [3][NFILT]; bit valid; } exp_t;
  exp_t q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    in_valid = 1'b0; s = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      exp_t e;
      in_valid = (n % 7) != 3;
      for (int i = 0; i < WIN; i++)
        s[i] = (n < 200) ? FIN_W'($urandom_range(0, 255)) : FIN_W'(int'($urandom_range(0, 447)) - 96);
      e.valid = in_valid;
      for (int p = 0; p < 3; p++)
        for (int k = 0; k < NFILT; k++) begin
          automatic int sum = 0;
          for (int i = 0; i < 8; i++) sum += coef[p][i] * int'(signed'(s[k + i]));
          e.v[p][k] = (sum + 32) >>> 6;
        end
      q.push_back(e);
      @(posedge clk);
      #1;
      if (q.size() > 2) begin
        exp_t x;
        x = q.pop_front();
        checks++;
        if (out_valid != x.valid) begin failures++; $display("FAIL valid"); end
        if (x.valid)
          for (int k = 0; k < NFILT; k++) begin
            checks += 3;
            if (int'(signed'(up[k]))   != x.v[0][k]) begin failures++; $display("FAIL up[%0d] %0d exp %0d t=%0t", k, up[k], x.v[0][k], $time); end
            if (int'(signed'(mid[k]))  != x.v[1][k]) begin failures++; $display("FAIL mid[%0d]", k); end
            if (int'(signed'(down[k])) != x.v[2][k]) begin failures++; $display("FAIL down[%0d]", k); end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
