// tb_fir_middle: checks the half-sample (Middle) filter against the HEVC
// coefficients -1 4 -11 40 40 -11 4 -1 applied directly, (sum + 32) >> 6, for
// random integer taps, random H-type taps (-96..351) and the extremes. The
// expected value is compared three clocks after the taps (pipeline depth).
module tb_fir_middle;
  import fme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [7:0][FIN_W-1:0] s;
  logic signed [MID_W-1:0] y;
  logic en = 1'b1;

  fir_middle dut (.clk, .en, .s, .y);

  const int cm [8] = '{-1, 4, -11, 40, 40, -11, 4, -1};

  function automatic int model(logic signed [7:0][FIN_W-1:0] t);
    int sum = 0;
    for (int i = 0; i < 8; i++) sum += cm[i] * int'(signed'(t[i]));
    return (sum + 32) >>> 6;
  endfunction

  int expq [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) begin
        if (n < 200)       s[i] = FIN_W'($urandom_range(0, 255));
        else if (n == 200) s[i] = (cm[i] < 0) ? 10'sd0 : 10'sd255;
        else if (n == 201) s[i] = (cm[i] > 0) ? 10'sd0 : 10'sd255;
        else if (n == 202) s[i] = (cm[i] < 0) ? -10'sd96 : 10'sd351;
        else if (n == 203) s[i] = (cm[i] > 0) ? -10'sd96 : 10'sd351;
        else               s[i] = FIN_W'(int'($urandom_range(0, 447)) - 96);
      end
      expq.push_back(model(s));
      @(posedge clk);
      #1;
      if (expq.size() > 2) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(y) != e) begin failures++; $display("FAIL %0d exp %0d", y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
