// omda2_filter: one 10-tap filter built as the optimised modular
// distributed-arithmetic architecture 2.
//
// Same lane folding and 16-word LUT contents as omda1_filter, but the lane
// bits are split into a low half (bits 0-5, unsigned) and a high half (bits
// 6-12, the last one the sign plane), each with its own LUT, adder and
// right-shift accumulator. The halves run in parallel and are joined by
//   y = lo + 2^6 * hi
// which halves the cycle count. The split follows the document; the 6/7 bit
// division of the 13-bit lanes is this design's.
//
// Interface as rmda1_filter; `done` pulses 8 cycles after `start`
// (one load cycle, 7 high-half planes).
module omda2_filter
  import dtcwt_pkg::*;
#(
  parameter int FILT = 0   // 0 H0a, 1 H1a, 2 H0b, 3 H1b
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  samp_t x [NTAP],
  output logic  busy,
  output logic  done,
  output fout_t y
);
  localparam int LP = DW + 3;
  localparam int PL = LP / 2;        // low planes
  localparam int PH = LP - PL;       // high planes (incl. sign)
  localparam int CO [4] = '{opt_coef(0), opt_coef(1), opt_coef(2), opt_coef(3)};

  logic signed [LP-1:0] lane [4];
  logic [PL-1:0]        w_lo [4];
  logic [PH-1:0]        w_hi [4];
  logic signed [9+PL:0] r_lo;
  logic signed [9+PH:0] r_hi;
  logic                 b_lo, b_hi, d_lo, d_hi;

  omda_preadd #(.FILT(FILT)) u_pre (.x, .lane);
  always_comb
    for (int i = 0; i < 4; i++) begin
      w_lo[i] = lane[i][PL-1:0];
      w_hi[i] = lane[i][LP-1:PL];
    end

  da_unit #(.N(4), .P(PL), .LW(9), .SIGN_TOP(1'b0), .C(CO)) u_lo (
    .clk, .rst_n, .start, .lane_word(w_lo), .busy(b_lo), .done(d_lo), .result(r_lo));
  da_unit #(.N(4), .P(PH), .LW(9), .SIGN_TOP(1'b1), .C(CO)) u_hi (
    .clk, .rst_n, .start, .lane_word(w_hi), .busy(b_hi), .done(d_hi), .result(r_hi));

  // the high half needs one more cycle than the low half
  assign busy = b_lo | b_hi;
  assign done = d_hi;
  assign y    = fout_t'(r_lo) + (fout_t'(r_hi) <<< PL);

endmodule
