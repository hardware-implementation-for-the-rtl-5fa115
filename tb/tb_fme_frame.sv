// tb_fme_frame: real-time workload test. One whole luma frame (default UHD
// 3840x2160) is cut into 64x64 coding tree units, each split into square PUs by
// a random quadtree (a unit that does not fit inside the frame is always
// split), and all PUs are fed to the engine back to back in CTU order.
//
// The reference frame is random; the current frame is the reference moved by a
// fixed integer vector, plus noise of +-1, so the integer search result is that
// vector. Reference reads outside the frame repeat the edge sample, as an HEVC
// reference picture is padded.
//
// Checks:
//   - the number of rising edges from the one that takes the first start to the
//     one that samples the last result equals 51 per 8x8 block of the frame plus
//     15 (the 66 edges of the first result less one 51-clock period), i.e. the
//     engine never stalls between PUs; the clock rate needed for 60 frames/s
//     follows from it and is printed;
//   - every 8x8 and 16x16 PU whose number is a multiple of 5 is compared with a
//     software model (best SAD and offset), as is the result count.
module tb_fme_frame;
  import fme_pkg::*;

  localparam int FWID = 3840;
  localparam int FHGT = 2160;
  localparam int MVW  = 16;
  localparam int GX   = 3;       // integer motion of the whole frame
  localparam int GY   = -2;
  localparam int MAXPU = (FWID / 8) * (FHGT / 8);

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

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

  byte unsigned rf [FWID][FHGT];
  byte unsigned cf [FWID][FHGT];

  // PU list
  int npu = 0;
  int px [MAXPU], py [MAXPU], ps [MAXPU];
  int n8 = 0;

  const int coef [3][8] = '{'{-1, 4, -10, 58, 17, -5, 1, 0},
                            '{-1, 4, -11, 40, 40, -11, 4, -1},
                            '{0, 1, -5, 17, 58, -10, 4, -1}};

  function automatic int pix(int x, int y);
    int cx, cy;
    cx = x < 0 ? 0 : (x >= FWID ? FWID - 1 : x);
    cy = y < 0 ? 0 : (y >= FHGT ? FHGT - 1 : y);
    return int'(rf[cx][cy]);
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int hsamp(int x, int y, int fx);
    int s = 0;
    for (int k = 0; k < 8; k++) s += coef[fx-1][k] * pix(x - 3 + k, y);
    return (s + 32) >>> 6;
  endfunction

  function automatic int fsamp(int qx, int qy);
    int ix, iy, fx, fy, s;
    ix = qx >>> 2; fx = qx & 3;
    iy = qy >>> 2; fy = qy & 3;
    s = 0;
    if (fx == 0 && fy == 0) return pix(ix, iy);
    if (fy == 0) return clip(hsamp(ix, iy, fx));
    if (fx == 0) begin
      for (int k = 0; k < 8; k++) s += coef[fy-1][k] * pix(ix, iy - 3 + k);
      return clip((s + 32) >>> 6);
    end
    for (int k = 0; k < 8; k++) s += coef[fy-1][k] * hsamp(ix, iy - 3 + k, fx);
    return clip((s + 32) >>> 6);
  endfunction

  // SAD of PU p at quarter offset (dx, dy) from its integer vector
  function automatic int pu_sad(int p, int dx, int dy);
    int n, s;
    n = 8 << ps[p];
    s = 0;
    for (int x = 0; x < n; x++)
      for (int y = 0; y < n; y++) begin
        int v, c;
        v = fsamp(4 * (px[p] + x + GX) + dx, 4 * (py[p] + y + GY) + dy);
        c = int'(cf[px[p] + x][py[p] + y]);
        s += (v > c) ? v - c : c - v;
      end
    return s;
  endfunction

  function automatic bit sampled(int p);
    return (ps[p] <= 1) && (p % 5 == 0);
  endfunction

  // quadtree split of the square at (x, y) with size code sz
  function automatic void split(int x, int y, int sz);
    int n = 8 << sz;
    if (x >= FWID || y >= FHGT) return;
    if (sz > 0 && (x + n > FWID || y + n > FHGT || $urandom_range(0, 2) == 0)) begin
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < 2; i++) split(x + i * n / 2, y + j * n / 2, sz - 1);
    end else begin
      px[npu] = x; py[npu] = y; ps[npu] = sz;
      n8 += (1 << sz) * (1 << sz);
      npu++;
    end
  endfunction

  // ---------------------------------------------------------------- memories
  int issue_pu = -1;
  int pu_d [3];

  always @(posedge clk) begin
    if (start && ready) issue_pu <= issue_pu + 1;
    pu_d[0] <= issue_pu;
    pu_d[1] <= pu_d[0];
    pu_d[2] <= pu_d[1];
  end

  always @(posedge clk) begin
    if (ref_rd_en && issue_pu >= 0) begin
      automatic int bx = px[issue_pu] + GX + 8 * int'(ref_rd_sub_x) - 4;
      automatic int by = py[issue_pu] + GY + 8 * int'(ref_rd_sub_y) - 4;
      for (int i = 0; i < WIN; i++)
        ref_line[i] <= ref_rd_col ? 8'(pix(bx + int'(ref_rd_idx), by + i))
                                  : 8'(pix(bx + i, by + int'(ref_rd_idx)));
    end
  end

  always @(posedge clk) begin
    if (cur_rd_en && pu_d[2] >= 0) begin
      automatic int bx = px[pu_d[2]] + 8 * int'(cur_rd_sub_x);
      automatic int by = py[pu_d[2]] + 8 * int'(cur_rd_sub_y);
      for (int i = 0; i < BLK; i++)
        cur_line[i] <= cur_rd_col ? cf[bx + int'(cur_rd_idx)][by + i]
                                  : cf[bx + i][by + int'(cur_rd_idx)];
    end
  end

  // ---------------------------------------------------------------- results
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int res_n = 0, n_model = 0, n_frac = 0;
  longint t_first, t_last;
  int ime_sads [MAXPU];

  always @(posedge clk) begin
    if (start && ready && issue_pu < 0) t_first = cyc;
    if (res_valid) begin
      automatic int p = res_n;
      t_last = cyc;
      if (res_frac_win) n_frac++;
      if (sampled(p)) begin
        int best, bx, by;
        best = ime_sads[p]; bx = 0; by = 0;
        for (int id = 0; id < NPOS; id++) begin
          int s;
          s = pu_sad(p, off_x(id), off_y(id));
          if (s < best) begin best = s; bx = off_x(id); by = off_y(id); end
        end
        n_model++;
        checks += 2;
        if (int'(res_sad) != best) begin
          failures++; $display("FAIL pu %0d (%0d,%0d) size %0d: sad %0d expected %0d", p, px[p], py[p], 8 << ps[p], res_sad, best);
        end
        if (int'(res_frac_x) != bx || int'(res_frac_y) != by) begin
          failures++; $display("FAIL pu %0d offset", p);
        end
      end
      res_n++;
    end
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results", res_n, npu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < FWID; x++)
      for (int y = 0; y < FHGT; y++)
        rf[x][y] = byte'($urandom);
    for (int x = 0; x < FWID; x++)
      for (int y = 0; y < FHGT; y++)
        cf[x][y] = byte'(clip(pix(x + GX, y + GY) + int'($urandom_range(0, 2)) - 1));
    for (int cy = 0; cy < FHGT; cy += 64)
      for (int cx = 0; cx < FWID; cx += 64) split(cx, cy, 3);
    // IME SAD of the sampled PUs (the integer vector); others get a large value
    for (int p = 0; p < npu; p++) ime_sads[p] = sampled(p) ? pu_sad(p, 0, 0) : 1000000;
    $display("frame %0dx%0d: %0d PUs, %0d 8x8 blocks", FWID, FHGT, npu, n8);

    start = 1'b0; pu_size = '0; ime_mv_x = '0; ime_mv_y = '0; ime_sad = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    for (int p = 0; p < npu; p++) begin
      #1;
      start    = 1'b1;
      pu_size  = 2'(ps[p]);
      ime_mv_x = MVW'(4 * GX);
      ime_mv_y = MVW'(4 * GY);
      ime_sad  = ACC_W'(ime_sads[p]);
      forever begin
        @(negedge clk);
        if (ready) break;
      end
      @(posedge clk);
    end
    #1 start = 1'b0;
    while (res_n < npu) @(posedge clk);

    checks++;
    if (t_last - t_first != longint'(51) * n8 + 15) begin
      failures++;
      $display("FAIL frame took %0d clocks, expected %0d", t_last - t_first, 51 * n8 + 15);
    end
    checks++;
    if (n_model == 0) begin failures++; $display("FAIL nothing compared"); end
    $display("frame clocks %0d, %0d PUs compared with the model, %0d fractional winners",
             t_last - t_first, n_model, n_frac);
    $display("clock needed for 60 frames/s: %0d.%01d MHz",
             (t_last - t_first) * 60 / 1000000, ((t_last - t_first) * 60 / 100000) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
