// tb_sad_accumulator: feeds random line SADs for random candidates, each on the
// tree that serves it, some with load, and checks all 48 sums every clock
// against a software model; done must follow last_in by one clock. A run of
// 64 x 8 lines of 2040 (the largest 64x64 SAD) checks that 20 bits suffice.
// Tags addressed to a candidate on a tree that does not serve it must be
// ignored.
module tb_sad_accumulator;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NTREE-1:0][LSAD_W-1:0] sad;
  acc_tag_t [NTREE-1:0] atag;
  logic last_in, done;
  logic [NPOS-1:0][ACC_W-1:0] acc;

  sad_accumulator dut (.*);

  int model [NPOS];

  task automatic cycle_check(bit exp_done);
    @(posedge clk); #1;
    for (int b = 0; b < NPOS; b++) begin
      checks++;
      if (int'(acc[b]) != model[b]) begin
        failures++; $display("FAIL acc[%0d] %0d exp %0d", b, acc[b], model[b]);
      end
    end
    checks++;
    if (done != exp_done) begin failures++; $display("FAIL done"); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sad = '0; atag = '0; last_in = 1'b0;
    for (int b = 0; b < NPOS; b++) model[b] = 0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      bit was_last;
      sad = '0; atag = '0;
      for (int t = 0; t < NTREE; t++) begin
        int id;
        id = int'($urandom_range(0, NPOS - 1));
        if (tree_of(id) == t && $urandom_range(0, 3) != 0) begin
          atag[t] = '{valid: 1'b1, id: 6'(id), load: ($urandom_range(0, 9) == 0)};
          sad[t]  = 11'($urandom_range(0, 2040));
          model[id] = atag[t].load ? int'(sad[t]) : model[id] + int'(sad[t]);
        end else if ($urandom_range(0, 7) == 0) begin
          // a tag for a candidate this tree does not serve: no effect
          int other;
          other = (id + 1) % NPOS;
          if (tree_of(other) != t) begin
            atag[t] = '{valid: 1'b1, id: 6'(other), load: 1'b0};
            sad[t]  = 11'($urandom_range(1, 2040));
          end
        end
      end
      was_last = (n % 50) == 49;
      last_in = was_last;
      @(posedge clk); #1;
      last_in = 1'b0;
      sad = '0; atag = '0;
      for (int b = 0; b < NPOS; b++) begin
        checks++;
        if (int'(acc[b]) != model[b]) begin failures++; $display("FAIL acc[%0d] %0d exp %0d", b, acc[b], model[b]); end
      end
      checks++;
      if (done != was_last) begin failures++; $display("FAIL done %0d exp %0d", done, was_last); end
    end
    // worst case 64x64 PU on candidate 0: 512 lines of 2040
    for (int n = 0; n < 512; n++) begin
      atag = '0;
      atag[tree_of(0)] = '{valid: 1'b1, id: 6'd0, load: (n == 0)};
      sad[tree_of(0)]  = 11'd2040;
      model[0] = (n == 0) ? 2040 : model[0] + 2040;
      @(posedge clk); #1;
    end
    atag = '0;
    cycle_check(1'b0);
    checks++;
    if (model[0] != 4096 * 255) begin failures++; $display("FAIL model"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
