// tb_fme_top: end-to-end test of the FME engine at its default parameters.
//
// The testbench holds a reference frame and, per PU, a current block, and plays
// both external memories (one-clock read latency). It sends a sequence of PUs of
// all four sizes, some back to back, and checks for each:
//   - all 48 accumulated candidate SADs at the moment the accumulators finish,
//   - the final SAD, vector and fractional offset against a software model,
//   - the first-result latency of an 8x8 PU (65 clocks after start is taken) and
//     the spacing of back-to-back results (51 clocks per 8x8 sub-block).
// The model interpolates straight from the definition: 8-tap HEVC coefficients,
// (sum + 32) >> 6, diagonal samples from unclipped horizontal samples, clip to
// 0..255 before the SAD. Current blocks are built either as a noisy fractional
// shift of the reference (a fractional candidate wins) or as the integer block
// with IME SAD 0 (the integer vector wins).
// Mechanisms counted (each must occur): every PU size, back-to-back start,
// fractional win, integer win, H / V / D phase slots.
module tb_fme_top;
  import fme_pkg::*;

  localparam int FW = 200;           // frame edge
  localparam int NPU = 10;
  localparam int MVW = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---------------------------------------------------------------- DUT
  logic                       start, ready, busy;
  logic [1:0]                 pu_size;
  logic signed [MVW-1:0]      ime_mv_x, ime_mv_y;
  logic [ACC_W-1:0]           ime_sad;
  logic                       ref_rd_en, ref_rd_col;
  logic [3:0]                 ref_rd_idx;
  logic [2:0]                 ref_rd_sub_x, ref_rd_sub_y;
  logic [WIN-1:0][SAMP_W-1:0] ref_line;
  logic                       cur_rd_en, cur_rd_col;
  logic [2:0]                 cur_rd_idx, cur_rd_sub_x, cur_rd_sub_y;
  logic [BLK-1:0][SAMP_W-1:0] cur_line;
  logic                       res_valid, res_frac_win;
  logic [ACC_W-1:0]           res_sad;
  logic signed [MVW-1:0]      res_mv_x, res_mv_y;
  logic signed [2:0]          res_frac_x, res_frac_y;

  fme_top dut (.*);

  // ---------------------------------------------------------------- data
  byte unsigned frame [FW][FW];                 // [x][y]
  byte unsigned cur   [NPU][64][64];            // [pu][x][y]
  int  pu_sz   [NPU];                            // 0..3
  int  pu_ox   [NPU], pu_oy [NPU];               // integer best position in the frame
  int  pu_mode [NPU];                            // 0: fractional shift, 1: integer copy
  int  pu_b2b  [NPU];                            // start while the previous PU runs
  int  exp_sad [NPU][NPOS];
  int  exp_best_sad [NPU], exp_fx [NPU], exp_fy [NPU];
  int  ime_s   [NPU];

  const int coef [3][8] = '{'{-1, 4, -10, 58, 17, -5, 1, 0},
                            '{-1, 4, -11, 40, 40, -11, 4, -1},
                            '{0, 1, -5, 17, 58, -10, 4, -1}};

  function automatic int rnd6(int s);
    return (s + 32) >>> 6;
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int pix(int x, int y);
    return int'(frame[x][y]);
  endfunction

  // unclipped horizontal sample at integer (x,y) plus fx/4 (fx 1..3)
  function automatic int hsamp(int x, int y, int fx);
    int s = 0;
    for (int k = 0; k < 8; k++) s += coef[fx-1][k] * pix(x - 3 + k, y);
    return rnd6(s);
  endfunction

  // clipped fractional sample at quarter position (qx, qy), not both integer
  function automatic int fsamp(int qx, int qy);
    int ix, iy, fx, fy, s;
    ix = qx >>> 2; fx = qx & 3;
    iy = qy >>> 2; fy = qy & 3;
    s = 0;
    if (fy == 0) return clip(hsamp(ix, iy, fx));
    if (fx == 0) begin
      for (int k = 0; k < 8; k++) s += coef[fy-1][k] * pix(ix, iy - 3 + k);
      return clip(rnd6(s));
    end
    for (int k = 0; k < 8; k++) s += coef[fy-1][k] * hsamp(ix, iy - 3 + k, fx);
    return clip(rnd6(s));
  endfunction

  task automatic build_pu(int p, int sz, int mode, int b2b);
    int n, dx0, dy0, isad;
    pu_sz[p] = sz; pu_mode[p] = mode; pu_b2b[p] = b2b;
    n = 8 << sz;
    pu_ox[p] = 8 + int'($urandom_range(0, FW - 16 - n));
    pu_oy[p] = 8 + int'($urandom_range(0, FW - 16 - n));
    // fractional target offset of the current block
    do begin
      dx0 = int'($urandom_range(0, 6)) - 3;
      dy0 = int'($urandom_range(0, 6)) - 3;
    end while (dx0 == 0 && dy0 == 0);
    isad = 0;
    for (int x = 0; x < n; x++)
      for (int y = 0; y < n; y++) begin
        int v;
        if (mode == 0) v = clip(fsamp(4 * (pu_ox[p] + x) + dx0, 4 * (pu_oy[p] + y) + dy0)
                                + int'($urandom_range(0, 2)) - 1);
        else           v = pix(pu_ox[p] + x, pu_oy[p] + y);
        cur[p][x][y] = byte'(v);
        isad += (v > pix(pu_ox[p] + x, pu_oy[p] + y)) ? v - pix(pu_ox[p] + x, pu_oy[p] + y)
                                                      : pix(pu_ox[p] + x, pu_oy[p] + y) - v;
      end
    ime_s[p] = isad;
    // expected candidate SADs and winner
    exp_best_sad[p] = isad; exp_fx[p] = 0; exp_fy[p] = 0;
    for (int id = 0; id < NPOS; id++) begin
      int s = 0;
      for (int x = 0; x < n; x++)
        for (int y = 0; y < n; y++) begin
          int v = fsamp(4 * (pu_ox[p] + x) + off_x(id), 4 * (pu_oy[p] + y) + off_y(id));
          s += (v > int'(cur[p][x][y])) ? v - int'(cur[p][x][y]) : int'(cur[p][x][y]) - v;
        end
      exp_sad[p][id] = s;
      if (s < exp_best_sad[p]) begin
        exp_best_sad[p] = s; exp_fx[p] = off_x(id); exp_fy[p] = off_y(id);
      end
    end
  endtask

  // ---------------------------------------------------------------- memories
  int issue_pu = -1;        // PU whose slots fme_control issues
  int cur_pu_d [4];         // issue_pu delayed to the current-block request stage

  always_ff @(posedge clk) begin
    if (start && ready) issue_pu <= issue_pu + 1;
    cur_pu_d[0] <= issue_pu;
    for (int i = 1; i < 4; i++) cur_pu_d[i] <= cur_pu_d[i-1];
  end

  always_ff @(posedge clk) begin
    if (ref_rd_en && issue_pu >= 0) begin
      int bx, by;
      bx = pu_ox[issue_pu] + 8 * int'(ref_rd_sub_x) - 4;
      by = pu_oy[issue_pu] + 8 * int'(ref_rd_sub_y) - 4;
      for (int i = 0; i < WIN; i++)
        ref_line[i] <= ref_rd_col ? frame[bx + int'(ref_rd_idx)][by + i]
                                  : frame[bx + i][by + int'(ref_rd_idx)];
    end
  end

  always_ff @(posedge clk) begin
    if (cur_rd_en && cur_pu_d[2] >= 0) begin
      int bx, by, p;
      p  = cur_pu_d[2];
      bx = 8 * int'(cur_rd_sub_x);
      by = 8 * int'(cur_rd_sub_y);
      for (int i = 0; i < BLK; i++)
        cur_line[i] <= cur_rd_col ? cur[p][bx + int'(cur_rd_idx)][by + i]
                                  : cur[p][bx + i][by + int'(cur_rd_idx)];
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_size [4] = '{0, 0, 0, 0};
  int n_b2b = 0, n_fracwin = 0, n_imewin = 0;
  int n_ph [4] = '{0, 0, 0, 0};
  always_ff @(posedge clk) begin
    if (start && ready && busy) n_b2b <= n_b2b + 1;
    n_ph[dut.tag0.phase] <= n_ph[dut.tag0.phase] + 1;
  end

  // ---------------------------------------------------------------- checkers
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int acc_pu = 0;
  always @(posedge clk) begin
    if (dut.acc_done) begin
      for (int id = 0; id < NPOS; id++) begin
        checks++;
        if (int'(dut.acc[id]) != exp_sad[acc_pu][id]) begin
          failures++;
          if (failures < 20)
            $display("FAIL pu %0d cand %0d (%0d,%0d): sad %0d expected %0d", acc_pu, id,
                     off_x(id), off_y(id), dut.acc[id], exp_sad[acc_pu][id]);
        end
      end
      acc_pu++;
    end
  end

  int res_pu = 0;
  longint t_start [NPU];
  longint t_res   [NPU];
  always @(posedge clk) begin
    if (res_valid) begin
      automatic int p = res_pu;
      t_res[p] = cyc;
      checks += 3;
      if (int'(res_sad) != exp_best_sad[p]) begin
        failures++; $display("FAIL pu %0d best sad %0d expected %0d", p, res_sad, exp_best_sad[p]);
      end
      if (int'(res_frac_x) != exp_fx[p] || int'(res_frac_y) != exp_fy[p]) begin
        failures++; $display("FAIL pu %0d offset (%0d,%0d) expected (%0d,%0d)", p,
                             res_frac_x, res_frac_y, exp_fx[p], exp_fy[p]);
      end
      if (int'(res_mv_x) != 4 * pu_ox[p] + exp_fx[p] || int'(res_mv_y) != 4 * pu_oy[p] + exp_fy[p]) begin
        failures++; $display("FAIL pu %0d mv (%0d,%0d)", p, res_mv_x, res_mv_y);
      end
      if (res_frac_win) n_fracwin++; else n_imewin++;
      n_size[pu_sz[p]]++;
      res_pu++;
    end
  end

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results", res_pu, NPU);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    for (int x = 0; x < FW; x++)
      for (int y = 0; y < FW; y++)
        frame[x][y] = byte'($urandom_range(0, 255));
    for (int i = 0; i < 4; i++) cur_pu_d[i] = -1;
    #1 rst_n = 1'b0;
    //        pu  size mode b2b
    build_pu(0, 0, 0, 0);
    build_pu(1, 0, 0, 1);
    build_pu(2, 0, 1, 1);
    build_pu(3, 1, 0, 0);
    build_pu(4, 1, 0, 1);
    build_pu(5, 2, 0, 0);
    build_pu(6, 3, 0, 0);
    build_pu(7, 1, 1, 0);
    build_pu(8, 3, 1, 1);
    build_pu(9, 0, 0, 0);
    start = 1'b0; pu_size = '0; ime_mv_x = '0; ime_mv_y = '0; ime_sad = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int p = 0; p < NPU; p++) begin
      if (pu_b2b[p] == 0) while (busy || res_pu < p) @(posedge clk);
      #1;
      start    = 1'b1;
      pu_size  = 2'(pu_sz[p]);
      ime_mv_x = MVW'(4 * pu_ox[p]);
      ime_mv_y = MVW'(4 * pu_oy[p]);
      ime_sad  = ACC_W'(pu_mode[p] == 1 ? 0 : ime_s[p]);
      // ready only changes on a rising edge: sample it half a period before
      forever begin
        @(negedge clk);
        if (ready) break;
      end
      @(posedge clk);
      #1;
      t_start[p] = cyc;
      start = 1'b0;
    end
    while (res_pu < NPU) @(posedge clk);
    repeat (5) @(posedge clk);

    // timing: first result of an 8x8 PU, and back-to-back spacing
    checks++;
    if (t_res[0] - t_start[0] != 65) begin
      failures++; $display("FAIL 8x8 latency %0d, expected 65", t_res[0] - t_start[0]);
    end
    checks++;
    if (t_res[1] - t_res[0] != 51 || t_res[2] - t_res[1] != 51) begin
      failures++; $display("FAIL 8x8 spacing %0d %0d, expected 51", t_res[1] - t_res[0], t_res[2] - t_res[1]);
    end
    checks++;
    if (t_res[4] - t_res[3] != 204) begin
      failures++; $display("FAIL 16x16 spacing %0d, expected 204", t_res[4] - t_res[3]);
    end
    checks++;
    if (t_res[5] - t_start[5] != 16 * 51 + 14) begin
      failures++; $display("FAIL 32x32 latency %0d", t_res[5] - t_start[5]);
    end

    // every mechanism must have happened
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_size[s] == 0) begin failures++; $display("FAIL PU size %0d never ran", 8 << s); end
    end
    checks += 3;
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back start"); end
    if (n_fracwin == 0) begin failures++; $display("FAIL no fractional winner"); end
    if (n_imewin == 0)  begin failures++; $display("FAIL no integer winner"); end
    for (int ph = 1; ph < 4; ph++) begin
      checks++;
      if (n_ph[ph] == 0) begin failures++; $display("FAIL phase %0d never issued", ph); end
    end
    $display("sizes 8:%0d 16:%0d 32:%0d 64:%0d  b2b:%0d  frac wins:%0d  ime wins:%0d  slots H:%0d V:%0d D:%0d",
             n_size[0], n_size[1], n_size[2], n_size[3], n_b2b, n_fracwin, n_imewin,
             n_ph[1], n_ph[2], n_ph[3]);
    $display("8x8 latency %0d, 8x8 spacing %0d, 16x16 spacing %0d, 64x64 time %0d",
             t_res[0] - t_start[0], t_res[1] - t_res[0], t_res[4] - t_res[3], t_res[6] - t_start[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
