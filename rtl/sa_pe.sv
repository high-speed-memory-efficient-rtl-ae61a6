// sa_pe: processing element of the systolic filter array.
//
// One multiplier forms c_in * x_in. The product goes straight to the first
// adder/accumulator register and, through the sign-change vector (SCV), to
// the second: when scv_in is 1 the product is negated before it is added.
// Fed with a low-pass coefficient sequence and an alternating SCV bit pattern
// the PE therefore produces a low-pass and the matching high-pass output from
// the same products (even-sequence PE: even taps negated; odd-sequence PE:
// odd taps negated; the pattern is supplied by the array).
//
// The coefficient, its valid and SCV bit move one PE to the right per cycle
// and the sample moves one PE up per cycle (all registered outputs). `clr`
// zeroes both accumulators. Multiplier, SCV and two accumulators follow the
// document's PE figures; widths and the valid/clear signals are this
// design's choices.
module sa_pe
  import dtcwt_pkg::*;
#(
  parameter int unsigned CWID = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic signed [CWID-1:0] c_in,
  input  logic                   cv_in,
  input  logic                   scv_in,
  input  samp_t                  x_in,
  output logic signed [CWID-1:0] c_out,
  output logic                   cv_out,
  output logic                   scv_out,
  output samp_t                  x_out,
  output fout_t                  acc_p,   // plain accumulation
  output fout_t                  acc_s    // sign-changed accumulation
);
  fout_t prod;
  assign prod = fout_t'(c_in) * fout_t'(x_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_out   <= '0;
      cv_out  <= 1'b0;
      scv_out <= 1'b0;
      x_out   <= '0;
      acc_p   <= '0;
      acc_s   <= '0;
    end else begin
      c_out   <= c_in;
      cv_out  <= cv_in;
      scv_out <= scv_in;
      x_out   <= x_in;
      if (clr) begin
        acc_p <= '0;
        acc_s <= '0;
      end else if (cv_in) begin
        acc_p <= acc_p + prod;
        acc_s <= scv_in ? acc_s - prod : acc_s + prod;
      end
    end
  end

endmodule
