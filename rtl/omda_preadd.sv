// omda_preadd: operand folding for the optimised DA filters.
//
// Every filter of the bank uses only the coefficient magnitudes 0, 3, 23 and
// 178. The samples are summed, with the coefficient's sign, into magnitude
// groups g0 (0), g1 (3), g2 (23), g3 (178), and then into the four lanes
// weighted by the increments 0, 3, 20 and 155:
//   lane0 = g0, lane1 = g1 + g2 + g3, lane2 = g2 + g3, lane3 = g3
// so that 0*lane0 + 3*lane1 + 20*lane2 + 155*lane3 = sum_k c_k x_k.
// The four-coefficient form (0, 3, 20, 155) is the document's; the folding
// that produces its operands is this design's reading of it. A lane can sum
// up to 8 samples, so lanes are DW+3 bits wide. Purely combinational.
module omda_preadd
  import dtcwt_pkg::*;
#(
  parameter int FILT = 0   // 0 H0a, 1 H1a, 2 H0b, 3 H1b
) (
  input  samp_t               x    [NTAP],
  output logic signed [DW+2:0] lane [4]
);
  typedef logic signed [DW+2:0] lane_t;
  lane_t g [4];

  always_comb begin
    for (int m = 0; m < 4; m++) g[m] = '0;
    for (int k = 0; k < int'(NTAP); k++) begin
      if (coef(FILT, k) < 0) g[mag_group(FILT, k)] -= lane_t'(x[k]);
      else                   g[mag_group(FILT, k)] += lane_t'(x[k]);
    end
    lane[0] = g[0];
    lane[1] = g[1] + g[2] + g[3];
    lane[2] = g[2] + g[3];
    lane[3] = g[3];
  end

endmodule
