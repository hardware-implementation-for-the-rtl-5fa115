// tb_clip8: sweeps every 11-bit signed input through the clip and checks
// 0 for negatives, 255 above 255, identity in between; also the 10-bit variant.
module tb_clip8;
  import fme_pkg::*;

  int checks = 0, failures = 0;
  logic signed [MID_W-1:0] x11;
  logic signed [UD_W-1:0]  x10;
  logic [SAMP_W-1:0] y11, y10;

  clip8 #(.IN_W(MID_W)) u11 (.x(x11), .y(y11));
  clip8 #(.IN_W(UD_W))  u10 (.x(x10), .y(y10));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -1024; v < 1024; v++) begin
      int e;
      x11 = MID_W'(v);
      x10 = UD_W'(v / 2);
      #1;
      e = v < 0 ? 0 : (v > 255 ? 255 : v);
      checks++;
      if (int'(y11) != e) begin failures++; $display("FAIL 11-bit %0d -> %0d", v, y11); end
      e = (v / 2) < 0 ? 0 : ((v / 2) > 255 ? 255 : v / 2);
      checks++;
      if (int'(y10) != e) begin failures++; $display("FAIL 10-bit %0d -> %0d", v / 2, y10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
