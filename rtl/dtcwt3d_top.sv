// dtcwt3d_top: level-1 3D dual-tree complex wavelet transform of a block of
// M video frames, plus a side-by-side set of all proposed filter-bank forms.
//
// Transform: the M frames are processed in parallel, one dtcwt2d unit per
// frame; in_px[m] is the pixel of frame m at the same raster position, all
// accepted together (in_valid/in_ready). The units run in lock step (their
// timing does not depend on the data). For every position of the decimated
// 2D grid the 16 tree outputs of all frames go to the temporal_stage, which
// filters along time and forms the 32 real 3D subbands (4 low, 28 high) for
// each of the NT = (M-10)/2+1 temporal output positions:
//   out_sb[4*type + j], type = 4*dr + 2*dc + dt (d = 0 low, 1 high),
//   out_row/out_col the spatial position, out_t the temporal position.
// The 2D subbands of every frame are brought out too (sb2d, valid with
// sb2d_valid), and `clip` flags saturation of a requantised row result.
// Nine filter banks form the transform of one frame's worth of positions: one
// row bank and four column banks per frame unit and sixteen filters x four in
// the temporal stage; ARCH picks their architecture.
//
// Filter-bank comparison: cmp_x is one 10-sample window that, on cmp_start,
// goes to one filter bank of every architecture (RMDA-1, RMDA-2, OMDA-1,
// OMDA-2, PE array, RMSA, ORMSA); cmp_y[a][f] is filter f of architecture a
// and cmp_done[a] its completion pulse.
//
// The frame-parallel organisation, filter banks and sum/difference stages
// follow the document; ARCH's default (OMDA-1, the fastest form reported),
// the requantisation and the flow control are this design's choices.
module dtcwt3d_top
  import dtcwt_pkg::*;
#(
  parameter arch_e       ARCH  = ARCH_OMDA1,
  parameter int unsigned M     = 52,
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // 3D transform
  input  logic                          in_valid,
  output logic                          in_ready,
  input  samp_t                         in_px [M],
  output logic                          out_valid,
  output logic signed [YW+1:0]          out_sb [32],
  output logic [$clog2(IMG_H)-1:0]      out_row,
  output logic [$clog2(IMG_W)-1:0]      out_col,
  output logic [$clog2((M-NTAP)/2+2)-1:0] out_t,
  output logic                          out_last,
  output logic                          sb2d_valid,
  output logic signed [YW:0]            sb2d [M][16],
  output logic                          clip,
  // filter-bank comparison
  input  logic                          cmp_start,
  input  samp_t                         cmp_x [NTAP],
  output logic [6:0]                    cmp_busy,
  output logic [6:0]                    cmp_done,
  output fout_t                         cmp_y [7][4]
);
  localparam int unsigned XW   = $clog2(IMG_W);
  localparam int unsigned YBW  = $clog2(IMG_H);
  localparam int unsigned TAGW = XW + YBW + 1;

  logic [M-1:0] u_in_ready, u_out_valid, u_last, u_clip;
  samp_t        u_raw [M][16];
  logic [YBW-1:0] u_row [M];
  logic [XW-1:0]  u_col [M];
  logic         ts_in_ready, all_valid, ts_last_t;
  logic [TAGW-1:0] ts_tag;

  assign in_ready  = &u_in_ready;
  assign all_valid = &u_out_valid;

  for (genvar m = 0; m < M; m++) begin : g_frame
    dtcwt2d #(.ARCH(ARCH), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_2d (
      .clk, .rst_n,
      .in_valid(in_valid && in_ready), .in_ready(u_in_ready[m]), .in_px(in_px[m]),
      .out_valid(u_out_valid[m]), .out_ready(ts_in_ready && all_valid),
      .raw(u_raw[m]), .sb2d(sb2d[m]), .out_row(u_row[m]), .out_col(u_col[m]),
      .out_last(u_last[m]), .clip(u_clip[m]));
  end

  assign sb2d_valid = all_valid && ts_in_ready;
  assign clip       = |u_clip;

  temporal_stage #(.ARCH(ARCH), .M(M), .TAGW(TAGW)) u_time (
    .clk, .rst_n,
    .in_valid(all_valid), .in_ready(ts_in_ready), .in_raw(u_raw),
    .in_tag({u_last[0], u_row[0], u_col[0]}),
    .out_valid, .out_sb, .out_t, .out_tag(ts_tag), .out_last_t(ts_last_t));

  assign out_col  = ts_tag[XW-1:0];
  assign out_row  = ts_tag[XW +: YBW];
  assign out_last = ts_tag[TAGW-1] && ts_last_t;

  // ---------------- filter-bank comparison ----------------
  for (genvar a = 0; a < 7; a++) begin : g_cmp
    filter_bank #(.ARCH(arch_e'(a))) u_fb (
      .clk, .rst_n, .start(cmp_start), .x(cmp_x), .busy(cmp_busy[a]), .done(cmp_done[a]),
      .y(cmp_y[a]));
  end

endmodule
