// tb_sad_trees: runs complete 51-slot block schedules (H rows, V columns,
// D columns) through the twelve trees with random fractional samples and a
// random current block, and checks the routing from the candidates' side: for
// every slot, each of the 48 candidates that owns a line in that slot must
// appear on exactly one tree output, with the right SAD and load flag, and no
// other tree output may be valid. Which samples a candidate uses is derived
// here from its quarter-sample offset alone: the sample at block coordinate X
// with offset d lies at filter index floor((4X + d) / 4) + 1 of phase
// (d mod 4) - 1.
module tb_sad_trees;
  import fme_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fme_tag_t tag;
  logic [NPHASE-1:0][NFILT-1:0][SAMP_W-1:0] f;
  logic [BLK-1:0][SAMP_W-1:0] cur_line;
  logic [NTREE-1:0][LSAD_W-1:0] sad;
  acc_tag_t [NTREE-1:0] atag;
  logic last_out;

  sad_trees dut (.*);

  byte unsigned cb [BLK][BLK];   // current block [x][y]

  typedef struct { int n; int id [NPOS]; int s [NPOS]; bit ld [NPOS]; bit last; } exp_t;
  exp_t q [$];

  function automatic int dx_of(int id); return off_x(id); endfunction
  function automatic int fl4(int v); return v >>> 2; endfunction

  // expected contributions of one slot
  function automatic exp_t model(fme_tag_t t);
    exp_t e;
    e.n = 0;
    e.last = t.pu_last;
    for (int id = 0; id < NPOS; id++) begin
      int dx, dy, ph, s;
      bit use_it, ld;
      dx = off_x(id); dy = off_y(id);
      use_it = 0; s = 0; ld = 0;
      if (t.phase == PH_H && dy == 0 && t.idx >= 4 && t.idx <= 11) begin
        int y = int'(t.idx) - 4;
        ph = (dx & 3) - 1;
        use_it = 1; ld = t.pu_first && y == 0;
        for (int x = 0; x < BLK; x++) begin
          int v = int'(f[ph][fl4(4 * x + dx) + 1]);
          s += (v > int'(cb[x][y])) ? v - int'(cb[x][y]) : int'(cb[x][y]) - v;
        end
      end else if (t.phase == PH_V && dx == 0) begin
        int x = int'(t.idx);
        ph = (dy & 3) - 1;
        use_it = 1; ld = t.pu_first && x == 0;
        for (int y = 0; y < BLK; y++) begin
          int v = int'(f[ph][fl4(4 * y + dy) + 1]);
          s += (v > int'(cb[x][y])) ? v - int'(cb[x][y]) : int'(cb[x][y]) - v;
        end
      end else if (t.phase == PH_D && dx != 0 && dy != 0 && ((dx & 3) - 1) == int'(t.th)) begin
        int x = int'(t.idx) - 1 - fl4(dx);     // candidate column of this H column
        if (x >= 0 && x < BLK) begin
          ph = (dy & 3) - 1;
          use_it = 1; ld = t.pu_first && x == 0;
          for (int y = 0; y < BLK; y++) begin
            int v = int'(f[ph][fl4(4 * y + dy) + 1]);
            s += (v > int'(cb[x][y])) ? v - int'(cb[x][y]) : int'(cb[x][y]) - v;
          end
        end
      end
      if (use_it) begin
        e.id[e.n] = id; e.s[e.n] = s; e.ld[e.n] = ld; e.n++;
      end
    end
    return e;
  endfunction

  task automatic check(exp_t e);
    int nvalid = 0;
    for (int t = 0; t < NTREE; t++) if (atag[t].valid) nvalid++;
    checks += 2;
    if (nvalid != e.n) begin failures++; $display("FAIL %0d trees valid, expected %0d", nvalid, e.n); end
    if (last_out != e.last) begin failures++; $display("FAIL last_out"); end
    for (int i = 0; i < e.n; i++) begin
      int hits = 0;
      for (int t = 0; t < NTREE; t++)
        if (atag[t].valid && int'(atag[t].id) == e.id[i]) begin
          hits++;
          checks += 2;
          if (int'(sad[t]) != e.s[i]) begin
            failures++; $display("FAIL cand %0d sad %0d exp %0d", e.id[i], sad[t], e.s[i]);
          end
          if (atag[t].load != e.ld[i]) begin failures++; $display("FAIL cand %0d load", e.id[i]); end
        end
      checks++;
      if (hits != 1) begin failures++; $display("FAIL cand %0d on %0d trees", e.id[i], hits); end
    end
  endtask

  task automatic slot(phase_e ph, int idx, int th, bit first, bit last);
    exp_t e;
    tag = '0;
    tag.phase = ph; tag.idx = 4'(idx); tag.th = 2'(th);
    tag.pu_first = first; tag.pu_last = last;
    for (int p = 0; p < NPHASE; p++)
      for (int k = 0; k < NFILT; k++) f[p][k] = 8'($urandom);
    // the current line the engine fetches for this slot
    for (int i = 0; i < BLK; i++)
      case (ph)
        PH_H:    cur_line[i] = (idx >= 4 && idx <= 11) ? cb[i][idx - 4] : 8'($urandom);
        PH_V:    cur_line[i] = cb[idx][i];
        PH_D:    cur_line[i] = (idx <= 7) ? cb[idx][i] : 8'($urandom);
        default: cur_line[i] = 8'($urandom);
      endcase
    e = model(tag);
    q.push_back(e);
    @(posedge clk); #1;
    if (q.size() > 3) check(q.pop_front());
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tag = '0; f = '0; cur_line = '0;
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int b = 0; b < 6; b++) begin
      bit first = (b % 2) == 0;
      for (int x = 0; x < BLK; x++) for (int y = 0; y < BLK; y++) cb[x][y] = 8'($urandom);
      for (int i = 0; i < CYC_H; i++) slot(PH_H, i, 0, first, 0);
      for (int i = 0; i < CYC_V; i++) slot(PH_V, i, 0, first, 0);
      for (int i = 0; i < CYC_D; i++) slot(PH_D, i / 3, i % 3, first, (i == CYC_D - 1) && !first);
      if (b == 3) repeat (3) slot(PH_NONE, 0, 0, 0, 0);
    end
    repeat (5) slot(PH_NONE, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
