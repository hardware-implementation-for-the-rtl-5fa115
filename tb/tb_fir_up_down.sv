// tb_fir_up_down: checks the Up (quarter) and Down (three-quarter) filters
// against the HEVC coefficient sets applied directly, (sum + 32) >> 6, over
// random 10-bit signed taps and the extreme 8-bit inputs. Both instances run
// every clock; expected values travel in a three-deep queue matching the
// filter's three pipeline stages, which also checks the latency.
module tb_fir_up_down;
  import fme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [7:0][FIN_W-1:0] s;
  logic signed [UD_W-1:0] y_up, y_dn;
  logic en = 1'b1;

  fir_up_down #(.DOWN(1'b0)) u_up (.clk, .en, .s, .y(y_up));
  fir_up_down #(.DOWN(1'b1)) u_dn (.clk, .en, .s, .y(y_dn));

  const int cu [8] = '{-1, 4, -10, 58, 17, -5, 1, 0};

  function automatic int model(logic signed [7:0][FIN_W-1:0] t, bit down);
    int sum = 0;
    for (int i = 0; i < 8; i++) sum += (down ? cu[7-i] : cu[i]) * int'(signed'(t[i]));
    return (sum + 32) >>> 6;
  endfunction

  int exp_up [$], exp_dn [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      for (int i = 0; i < 8; i++) begin
        if (n < 200)      s[i] = FIN_W'($urandom_range(0, 255));        // integer taps
        else if (n < 400) s[i] = FIN_W'(int'($urandom_range(0, 447)) - 96); // H-type range
        else if (n == 400) s[i] = (cu[i] < 0) ? 10'sd0 : 10'sd255;       // Up maximum
        else if (n == 401) s[i] = (cu[i] > 0) ? 10'sd0 : 10'sd255;       // Up minimum
        else              s[i] = FIN_W'($urandom);
      end
      exp_up.push_back(model(s, 1'b0));
      exp_dn.push_back(model(s, 1'b1));
      @(posedge clk);
      #1;
      if (exp_up.size() > 2) begin
        int eu, ed;
        eu = exp_up.pop_front();
        ed = exp_dn.pop_front();
        // values beyond the 10-bit output only arise from out-of-range taps
        if (n < 402) begin
          checks += 2;
          if (int'(y_up) != eu) begin failures++; $display("FAIL up %0d exp %0d", y_up, eu); end
          if (int'(y_dn) != ed) begin failures++; $display("FAIL down %0d exp %0d", y_dn, ed); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
