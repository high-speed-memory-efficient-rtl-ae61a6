// dtcwt2d: level-1 2D dual-tree complex wavelet transform of one frame.
//
// Pixels arrive in raster order. A 10-sample row shift register feeds the row
// filter bank (H0a, H1a, H0b, H1b along z1) at every second position once ten
// samples of the row are present, i.e. windows start at columns 0, 2, ...,
// IMG_W-10 (decimation by 2, no boundary extension). The four row outputs are
// requantised to DW bits and written, as one word, into a 10-line circular
// line buffer. After each row r >= 9 with r-9 even, a column pass runs: for
// every buffered column the ten lines r-9..r form the column window of four
// column filter banks (one per row output), giving the 16 tree outputs
// raw[4*fr + fc] (fr row filter, fc column filter; index = filt_e). The
// 16 outputs are also combined by four sigma_delta2d stages into the 2D
// subbands (sb2d, full precision).
//
// Flow control: in_ready is low while a row window is filtered or a column
// pass runs. Each output is held with out_valid until out_ready. Outputs come
// in raster order of the decimated grid (out_row, out_col), NOX x NOY per
// frame, out_last marks the final one. `clip` pulses when a row result
// saturates in requantisation. out_row keeps the width of a frame row index,
// so at the default size (at most 251 decimated rows) its top bit stays 0.
// The structure (row bank, four column banks,
// sum/difference) follows the document; the line buffer, the handshake,
// the valid-only borders and the stall-based scheduling are this design's.
module dtcwt2d
  import dtcwt_pkg::*;
#(
  parameter arch_e       ARCH  = ARCH_OMDA1,
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  samp_t               in_px,
  output logic                out_valid,
  input  logic                out_ready,
  output samp_t               raw [16],        // requantised tree outputs
  output logic signed [YW:0]  sb2d [16],       // {re_a, re_b, im_a, im_b} x 4 types
  output logic [$clog2(IMG_H)-1:0] out_row,
  output logic [$clog2(IMG_W)-1:0] out_col,
  output logic                out_last,
  output logic                clip
);
  localparam int unsigned NOX = (IMG_W - NTAP) / 2 + 1;
  localparam int unsigned XW  = $clog2(IMG_W);
  localparam int unsigned YBW = $clog2(IMG_H);
  localparam int unsigned OXW = $clog2(NOX);

  typedef enum logic [2:0] {S_ROW, S_RSTART, S_RWAIT, S_CSTART, S_CWAIT, S_OUT} state_e;
  state_e state;

  logic [XW-1:0]  cx;           // column of the next pixel
  logic [YBW-1:0] ry;           // row of the next pixel
  samp_t          rsh [NTAP];   // row shift register, rsh[9] newest
  logic [OXW-1:0] w_ox;         // output column of the pending row window
  logic           w_eol;        // pending window is the last of its row
  logic [YBW-1:0] w_row;        // row of the pending window
  logic [3:0]     slot;         // line-buffer slot of the current row
  logic [3:0]     base;         // slot of the oldest line of the column window
  logic [OXW-1:0] ocx;          // column pass position
  logic [YBW-1:0] orow;         // last row of the column window

  // ---------------- row filter bank ----------------
  logic  rb_start, rb_busy, rb_done;
  fout_t rb_y [4];
  filter_bank #(.ARCH(ARCH)) u_row (
    .clk, .rst_n, .start(rb_start), .x(rsh), .busy(rb_busy), .done(rb_done), .y(rb_y));
  assign rb_start = (state == S_RSTART);

  // ---------------- line buffer ----------------
  logic [4*DW-1:0] lb_wdata;
  logic [4*DW-1:0] lb_rdata [NTAP];
  logic            lb_we;
  always_comb
    for (int f = 0; f < 4; f++) lb_wdata[f*DW +: DW] = requant(rb_y[f]);
  assign lb_we = (state == S_RWAIT) && rb_done;

  for (genvar s = 0; s < NTAP; s++) begin : g_line
    line_mem #(.WIDTH(4*DW), .DEPTH(NOX)) u_line (
      .clk, .we(lb_we && (slot == 4'(s))), .waddr(w_ox), .wdata(lb_wdata),
      .raddr(ocx), .rdata(lb_rdata[s]));
  end

  // ---------------- column filter banks ----------------
  logic       cb_start;
  logic [3:0] cb_busy, cb_done;
  samp_t      cwin [4][NTAP];
  fout_t      cb_y [4][4];
  always_comb
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < int'(NTAP); k++)
        cwin[f][k] = lb_rdata[(int'(base) + k) % NTAP][f*DW +: DW];
  assign cb_start = (state == S_CSTART);

  for (genvar f = 0; f < 4; f++) begin : g_col
    filter_bank #(.ARCH(ARCH)) u_col (
      .clk, .rst_n, .start(cb_start), .x(cwin[f]), .busy(cb_busy[f]), .done(cb_done[f]),
      .y(cb_y[f]));
  end

  // column outputs stay valid after done until the next start
  always_comb
    for (int fr = 0; fr < 4; fr++)
      for (int fc = 0; fc < 4; fc++) raw[fr*4 + fc] = requant(cb_y[fr][fc]);

  // ---------------- sum / difference ----------------
  // subband type (dr, dc): tree a filter = d, tree b filter = 2 + d
  for (genvar dr = 0; dr < 2; dr++) begin : g_sdr
    for (genvar dc = 0; dc < 2; dc++) begin : g_sdc
      localparam int T = dr * 2 + dc;
      sigma_delta2d #(.W(YW)) u_sd (
        .r (cb_y[dr][dc]),
        .t1(cb_y[2 + dr][dc]),
        .t2(cb_y[dr][2 + dc]),
        .u (cb_y[2 + dr][2 + dc]),
        .re_a(sb2d[T*4 + 0]), .re_b(sb2d[T*4 + 1]), .im_a(sb2d[T*4 + 2]), .im_b(sb2d[T*4 + 3]));
    end
  end

  // ---------------- control ----------------
  assign in_ready  = (state == S_ROW);
  assign out_valid = (state == S_OUT);
  assign out_col   = XW'(ocx);
  assign out_row   = YBW'((int'(orow) - (NTAP - 1)) / 2);
  assign out_last  = (int'(ocx) == NOX - 1) && (int'(orow) == IMG_H - 1);

  logic clip_any;
  always_comb begin
    clip_any = 1'b0;
    for (int f = 0; f < 4; f++) clip_any |= requant_clips(rb_y[f]);
  end
  assign clip = lb_we && clip_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ROW;
      cx    <= '0;
      ry    <= '0;
      w_ox  <= '0;
      w_eol <= 1'b0;
      w_row <= '0;
      slot  <= '0;
      base  <= '0;
      ocx   <= '0;
      orow  <= '0;
      for (int k = 0; k < int'(NTAP); k++) rsh[k] <= '0;
    end else begin
      case (state)
        S_ROW: if (in_valid) begin
          for (int k = 0; k < int'(NTAP) - 1; k++) rsh[k] <= rsh[k+1];
          rsh[NTAP-1] <= in_px;
          if (int'(cx) >= int'(NTAP) - 1 && cx[0] == 1'b1) begin
            // window of columns cx-9 .. cx is complete
            w_ox  <= OXW'((int'(cx) - (NTAP - 1)) / 2);
            w_eol <= (int'(cx) == IMG_W - 1);
            w_row <= ry;
            state <= S_RSTART;
          end
          if (int'(cx) == IMG_W - 1) begin
            cx <= '0;
            ry <= (int'(ry) == IMG_H - 1) ? '0 : ry + 1'b1;
          end else begin
            cx <= cx + 1'b1;
          end
        end
        S_RSTART: state <= S_RWAIT;
        S_RWAIT: if (rb_done) begin
          if (w_eol) begin
            slot <= (slot == 4'(NTAP - 1)) ? '0 : slot + 1'b1;
            if (int'(w_row) >= int'(NTAP) - 1 && w_row[0] == 1'b1) begin
              // lines w_row-9 .. w_row: the oldest is the slot after this one
              base  <= (slot == 4'(NTAP - 1)) ? '0 : slot + 1'b1;
              orow  <= w_row;
              ocx   <= '0;
              state <= S_CSTART;
            end else begin
              state <= S_ROW;
            end
            if (int'(w_row) == IMG_H - 1) slot <= '0;
          end else begin
            state <= S_ROW;
          end
        end
        S_CSTART: state <= S_CWAIT;
        S_CWAIT: if (&cb_done) state <= S_OUT;
        S_OUT: if (out_ready) begin
          if (int'(ocx) == NOX - 1) begin
            state <= S_ROW;
          end else begin
            ocx   <= ocx + 1'b1;
            state <= S_CSTART;
          end
        end
        default: state <= S_ROW;
      endcase
    end
  end

endmodule
