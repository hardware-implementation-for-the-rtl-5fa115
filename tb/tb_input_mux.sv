// tb_input_mux: checks that the filter inputs are the zero-extended reference
// samples when sel_hbuf is low and the signed H-buffer samples when it is high.
module tb_input_mux;
  import fme_pkg::*;

  int checks = 0, failures = 0;
  logic sel_hbuf;
  logic [WIN-1:0][SAMP_W-1:0] ref_line;
  logic signed [WIN-1:0][HBUF_W-1:0] hbuf_col;
  logic signed [WIN-1:0][FIN_W-1:0] s;

  input_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel_hbuf = n[0];
      for (int i = 0; i < WIN; i++) begin
        ref_line[i] = 8'($urandom);
        hbuf_col[i] = HBUF_W'(int'($urandom_range(0, 447)) - 96);
      end
      #1;
      for (int i = 0; i < WIN; i++) begin
        int e;
        e = sel_hbuf ? int'(signed'(hbuf_col[i])) : int'(ref_line[i]);
        checks++;
        if (int'(signed'(s[i])) != e) begin
          failures++; $display("FAIL n %0d i %0d: %0d exp %0d", n, i, signed'(s[i]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
