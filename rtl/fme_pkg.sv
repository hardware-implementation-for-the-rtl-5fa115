// fme_pkg: shared constants, types and index functions of the HEVC fractional
// motion estimation (FME) engine.
//
// The engine works on 8x8 luma blocks. Around the best integer position found by
// the integer search, the 48 fractional candidates are the offsets (dx, dy) in
// quarter-sample units with dx, dy in -3..3, (0,0) excluded. A candidate is
// numbered by blk_id(): raster order of the 7x7 offset grid with the centre
// removed, so ids run 0..47.
//
// The interpolation reads a 16x16 window of integer samples (window coordinate
// 0..15 stands for block coordinate -4..11). Each filter set produces nine
// samples per cycle at block coordinates -1..7 (filter index k = coordinate + 1).
// The three fractional phases are numbered 0 = quarter (Up filters),
// 1 = half (Middle filters), 2 = three-quarter (Down filters).
//
// Each pipeline stage carries an fme_tag_t describing what the data in it is:
// which phase of the 51-cycle block schedule (H rows, V columns, D columns), the
// line index, and PU bookkeeping bits. Widths (10-bit H-type samples, 20-bit
// accumulators) follow the published design; the tag layout is this design's own.
package fme_pkg;

  localparam int BLK       = 8;    // base block edge
  localparam int WIN       = 16;   // integer window edge (block + 4 each side)
  localparam int NFILT     = 9;    // filters per filter set
  localparam int NPHASE    = 3;    // quarter, half, three-quarter
  localparam int NHCOL     = NPHASE * NFILT;  // 27 H-type columns
  localparam int NPOS      = 48;   // fractional candidates
  localparam int NTREE     = 12;   // SAD tree units
  localparam int SAMP_W    = 8;    // integer / clipped sample width
  localparam int FIN_W     = 10;   // filter input width (signed)
  localparam int UD_W      = 10;   // Up/Down filter output width (signed)
  localparam int MID_W     = 11;   // Middle filter output width (signed)
  localparam int HBUF_W    = 10;   // H-type buffer word width (signed)
  localparam int LSAD_W    = 11;   // SAD of one 8-sample line
  localparam int ACC_W     = 20;   // SAD accumulator width (64x64 PU)
  localparam int CYC_H     = 16;   // cycles of H rows per block
  localparam int CYC_V     = 8;    // cycles of V columns per block
  localparam int CYC_D     = 27;   // cycles of D columns per block
  localparam int CYC_BLK   = CYC_H + CYC_V + CYC_D;  // 51

  typedef enum logic [1:0] {
    PH_NONE = 2'd0,
    PH_H    = 2'd1,   // row of the integer window through the filters
    PH_V    = 2'd2,   // column of the integer window through the filters
    PH_D    = 2'd3    // column of the H-type buffer through the filters
  } phase_e;

  // What one pipeline slot holds.
  typedef struct packed {
    phase_e     phase;
    logic [3:0] idx;      // H: window row 0..15; V: block column 0..7; D: H column k 0..8
    logic [1:0] th;       // D: horizontal phase of the H column
    logic [2:0] sub_x;    // 8x8 sub-block of the PU
    logic [2:0] sub_y;
    logic       pu_first; // sub-block is the first of its PU
    logic       pu_last;  // last slot of the last sub-block of its PU
  } fme_tag_t;

  // What one SAD tree output is for.
  typedef struct packed {
    logic       valid;
    logic [5:0] id;       // candidate 0..47
    logic       load;     // first line of the PU: load instead of add
  } acc_tag_t;

  // Candidate id of offset (dx, dy), both in -3..3, not both zero.
  function automatic logic [5:0] blk_id(input int dx, input int dy);
    int r;
    r = (dy + 3) * 7 + (dx + 3);
    if (r > 24) r = r - 1;
    return 6'(r);
  endfunction

  // Offsets of a candidate id.
  function automatic int off_x(input int id);
    int r;
    r = (id >= 24) ? id + 1 : id;
    return (r % 7) - 3;
  endfunction

  function automatic int off_y(input int id);
    int r;
    r = (id >= 24) ? id + 1 : id;
    return (r / 7) - 3;
  endfunction

  // Phase (0..2) and side (0 = positive offset, 1 = negative) of a non-zero offset.
  function automatic int off_phase(input int d);
    return (d > 0) ? d - 1 : d + 3;
  endfunction

  // The SAD tree that always serves candidate id (static wiring of Fig. 10-a style
  // accumulators). H and V candidates use trees 0..5, D candidates trees 0..11.
  function automatic int tree_of(input int id);
    int dx, dy;
    dx = off_x(id);
    dy = off_y(id);
    if (dy == 0)
      return off_phase(dx) * 2 + ((dx < 0) ? 1 : 0);
    else if (dx == 0)
      return off_phase(dy) * 2 + ((dy < 0) ? 1 : 0);
    else
      return ((dx < 0) ? 6 : 0) + off_phase(dy) * 2 + ((dy < 0) ? 1 : 0);
  endfunction

endpackage
