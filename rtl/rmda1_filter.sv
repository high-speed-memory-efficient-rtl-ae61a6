// rmda1_filter: one 10-tap filter of the DTCWT filter bank built as the
// reduced modular distributed-arithmetic architecture 1.
//
// The ten window samples are split into two groups of five (taps 0-4 and
// 5-9). Each group has its own 32-word LUT (sums of its five coefficients),
// adder and right-shift accumulator, and both groups work in parallel on the
// same bit plane, LSB first, for all 10 bit planes. The final adder sums the
// two partial results:
//   y = sum_{k=0..4} c_k x_k + sum_{k=5..9} c_k x_k
// The grouping follows the document; the samples are taken as 10-bit two's
// complement, so the bit-9 plane is subtracted (the document writes every
// plane with a positive weight, which holds for unsigned data only).
//
// Interface: `start` loads the window x[0..9] (x[k] meets coefficient k);
// `done` pulses 11 cycles later (one load cycle, 10 bit planes) and y (full precision, coefficients scaled by
// 256) holds until the next start. `busy` is high while a window is in work.
module rmda1_filter
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
  localparam int CLO [5] = '{coef(FILT, 0), coef(FILT, 1), coef(FILT, 2), coef(FILT, 3), coef(FILT, 4)};
  localparam int CHI [5] = '{coef(FILT, 5), coef(FILT, 6), coef(FILT, 7), coef(FILT, 8), coef(FILT, 9)};

  logic [DW-1:0]       w_lo [5], w_hi [5];
  logic signed [21:0]  r_lo, r_hi;   // LW + P + 1 = 11 + 10 + 1
  logic                busy_lo, busy_hi, done_lo, done_hi;

  always_comb
    for (int i = 0; i < 5; i++) begin
      w_lo[i] = x[i];
      w_hi[i] = x[i+5];
    end

  da_unit #(.N(5), .P(DW), .LW(11), .SIGN_TOP(1'b1), .C(CLO)) u_lo (
    .clk, .rst_n, .start, .lane_word(w_lo), .busy(busy_lo), .done(done_lo), .result(r_lo));
  da_unit #(.N(5), .P(DW), .LW(11), .SIGN_TOP(1'b1), .C(CHI)) u_hi (
    .clk, .rst_n, .start, .lane_word(w_hi), .busy(busy_hi), .done(done_hi), .result(r_hi));

  assign busy = busy_lo | busy_hi;
  assign done = done_lo & done_hi;
  assign y    = fout_t'(r_lo + r_hi);

endmodule
