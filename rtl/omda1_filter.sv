// omda1_filter: one 10-tap filter built as the optimised modular
// distributed-arithmetic architecture 1.
//
// omda_preadd folds the ten samples into four lanes weighted 0, 3, 20 and
// 155; a single 16-word LUT (sums of those four increments), one adder and one
// right-shift accumulator then process the lanes bit-serially, LSB first,
// over all DW+3 = 13 lane bits (the last plane is the sign plane and is
// subtracted). Compared with rmda1_filter the LUT shrinks from 2 x 32 to 16
// words.
//
// Interface as rmda1_filter; `done` pulses 14 cycles after `start`
// (one load cycle, 13 bit planes).
module omda1_filter
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
  localparam int CO [4] = '{opt_coef(0), opt_coef(1), opt_coef(2), opt_coef(3)};

  logic signed [LP-1:0] lane [4];
  logic [LP-1:0]        w [4];
  logic signed [9+LP:0] r;

  omda_preadd #(.FILT(FILT)) u_pre (.x, .lane);
  always_comb for (int i = 0; i < 4; i++) w[i] = lane[i];

  da_unit #(.N(4), .P(LP), .LW(9), .SIGN_TOP(1'b1), .C(CO)) u_da (
    .clk, .rst_n, .start, .lane_word(w), .busy, .done, .result(r));

  assign y = fout_t'(r);

endmodule
