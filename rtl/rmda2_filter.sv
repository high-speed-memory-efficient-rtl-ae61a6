// rmda2_filter: one 10-tap filter built as the reduced modular
// distributed-arithmetic architecture 2.
//
// Both the samples and their bits are split: samples 0-4 and 5-9, bit planes
// 0-4 (low) and 5-9 (high). Four 32-word LUT / accumulator cells work in
// parallel, so a window takes 5 cycles instead of 10. The adder tree forms
//   y = (lo04 + lo59) + 2^5 * (hi04 + hi59)
// The split and the 2^5 weight follow the document. Samples are 10-bit two's
// complement; the bit-9 plane (last plane of the high cells) is subtracted.
//
// Interface as rmda1_filter, but `done` pulses 6 cycles after `start`
// (one load cycle, 5 bit planes).
module rmda2_filter
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
  localparam int HP = DW / 2;
  localparam int CA [5] = '{coef(FILT, 0), coef(FILT, 1), coef(FILT, 2), coef(FILT, 3), coef(FILT, 4)};
  localparam int CB [5] = '{coef(FILT, 5), coef(FILT, 6), coef(FILT, 7), coef(FILT, 8), coef(FILT, 9)};

  logic [HP-1:0]         w_alo [5], w_ahi [5], w_blo [5], w_bhi [5];
  logic signed [12+HP:0] r_alo, r_ahi, r_blo, r_bhi;
  logic [3:0]            bsy, dn;

  always_comb
    for (int i = 0; i < 5; i++) begin
      w_alo[i] = x[i][HP-1:0];
      w_ahi[i] = x[i][DW-1:HP];
      w_blo[i] = x[i+5][HP-1:0];
      w_bhi[i] = x[i+5][DW-1:HP];
    end

  da_unit #(.N(5), .P(HP), .LW(12), .SIGN_TOP(1'b0), .C(CA)) u_alo (
    .clk, .rst_n, .start, .lane_word(w_alo), .busy(bsy[0]), .done(dn[0]), .result(r_alo));
  da_unit #(.N(5), .P(HP), .LW(12), .SIGN_TOP(1'b1), .C(CA)) u_ahi (
    .clk, .rst_n, .start, .lane_word(w_ahi), .busy(bsy[1]), .done(dn[1]), .result(r_ahi));
  da_unit #(.N(5), .P(HP), .LW(12), .SIGN_TOP(1'b0), .C(CB)) u_blo (
    .clk, .rst_n, .start, .lane_word(w_blo), .busy(bsy[2]), .done(dn[2]), .result(r_blo));
  da_unit #(.N(5), .P(HP), .LW(12), .SIGN_TOP(1'b1), .C(CB)) u_bhi (
    .clk, .rst_n, .start, .lane_word(w_bhi), .busy(bsy[3]), .done(dn[3]), .result(r_bhi));

  assign busy = |bsy;
  assign done = &dn;
  assign y    = fout_t'(r_alo) + fout_t'(r_blo) + ((fout_t'(r_ahi) + fout_t'(r_bhi)) <<< HP);

endmodule
