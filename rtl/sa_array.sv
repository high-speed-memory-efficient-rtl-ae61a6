// sa_array: systolic filter-bank array, two rows of NCOL sa_pe cells.
//
// Row 0 (even-sequence PEs) receives the H0a coefficients with an SCV pattern
// that negates even taps, so its two accumulators give H0a and H1b
// (H1b[k] = (-1)^(k+1) H0a[k]). Row 1 (odd-sequence PEs) receives the H0b
// coefficients with odd taps negated and gives H0b and H1a
// (H1a[k] = (-1)^k H0b[k]). Column j computes the outputs for the window that
// starts at sample 2j (decimation by 2), so one pass yields NCOL output
// positions of all four filters.
//
// Dataflow: coefficients enter at the left and move right one PE per cycle;
// column j receives its samples x[2j+k] skewed by j cycles (zeros before), and
// each sample moves up from row 0 to row 1 one cycle later, the row-1
// coefficients entering one cycle after the row-0 ones.
//
// Interface: `start` latches the window x[0 .. 2*NCOL+7]; `done` pulses
// NCOL+11 cycles later and the outputs hold until the next start. The array
// shape, skew and row/column roles follow the document; the output index
// (two samples per column) is this design's reading of it.
module sa_array
  import dtcwt_pkg::*;
#(
  parameter int unsigned NCOL = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  samp_t x [2*NCOL+8],
  output logic  busy,
  output logic  done,
  output fout_t y0a [NCOL],
  output fout_t y1a [NCOL],
  output fout_t y0b [NCOL],
  output fout_t y1b [NCOL]
);
  localparam int unsigned NX   = 2 * NCOL + 8;
  localparam int unsigned LAST = NCOL + NTAP - 1;   // last feed step
  localparam int unsigned TW   = $clog2(LAST + 2);
  localparam int unsigned CWID = 9;
  typedef logic signed [CWID-1:0] c_t;

  samp_t     xw [NX];
  logic [TW-1:0] t;

  // horizontal links: c/cv/scv into PE (r, j) come from PE (r, j-1)
  c_t    c_l   [2][NCOL+1];
  logic  cv_l  [2][NCOL+1];
  logic  scv_l [2][NCOL+1];
  samp_t x_bot [NCOL];
  samp_t x_mid [NCOL];
  samp_t x_top [NCOL];

  // left-edge feed
  always_comb begin
    c_l[0][0]   = '0;
    cv_l[0][0]  = 1'b0;
    scv_l[0][0] = 1'b0;
    c_l[1][0]   = '0;
    cv_l[1][0]  = 1'b0;
    scv_l[1][0] = 1'b0;
    if (busy && int'(t) < int'(NTAP)) begin
      c_l[0][0]   = c_t'(coef(int'(F_H0A), int'(t)));
      cv_l[0][0]  = 1'b1;
      scv_l[0][0] = ~t[0];                 // even taps negated
    end
    if (busy && int'(t) >= 1 && int'(t) <= int'(NTAP)) begin
      c_l[1][0]   = c_t'(coef(int'(F_H0B), int'(t) - 1));
      cv_l[1][0]  = 1'b1;
      scv_l[1][0] = ~t[0];                 // tap t-1 odd <=> t even
    end
    for (int j = 0; j < int'(NCOL); j++) begin
      x_bot[j] = '0;
      if (busy && int'(t) >= j && int'(t) - j < int'(NTAP))
        x_bot[j] = xw[2*j + int'(t) - j];
    end
  end

  for (genvar j = 0; j < NCOL; j++) begin : g_col
    sa_pe #(.CWID(CWID)) u_even (
      .clk, .rst_n, .clr(start),
      .c_in(c_l[0][j]), .cv_in(cv_l[0][j]), .scv_in(scv_l[0][j]), .x_in(x_bot[j]),
      .c_out(c_l[0][j+1]), .cv_out(cv_l[0][j+1]), .scv_out(scv_l[0][j+1]), .x_out(x_mid[j]),
      .acc_p(y0a[j]), .acc_s(y1b[j]));
    sa_pe #(.CWID(CWID)) u_odd (
      .clk, .rst_n, .clr(start),
      .c_in(c_l[1][j]), .cv_in(cv_l[1][j]), .scv_in(scv_l[1][j]), .x_in(x_mid[j]),
      .c_out(c_l[1][j+1]), .cv_out(cv_l[1][j+1]), .scv_out(scv_l[1][j+1]), .x_out(x_top[j]),
      .acc_p(y0b[j]), .acc_s(y1a[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
      for (int i = 0; i < int'(NX); i++) xw[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        t    <= '0;
        for (int i = 0; i < int'(NX); i++) xw[i] <= x[i];
      end else if (busy) begin
        t <= t + 1'b1;
        if (int'(t) == int'(LAST)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
