// da_unit: one bit-serial distributed-arithmetic lane group (LUT + adder +
// right-shift accumulator register), the repeated cell of the DA filters.
//
// On `start` the N lane words (P bits each) are loaded into input shift
// registers. Each following cycle the lowest bit of every lane forms the LUT
// address; the LUT holds, for every address a, the sum of C[i] over the set
// bits i of a. The accumulator works LSB first with a right shift:
//   acc <= (acc +- (LUT << P)) >>> 1
// so after P cycles acc = sum_k LUT(plane k) * 2^k exactly. When SIGN_TOP is
// set the last plane is the two's-complement sign plane and is subtracted.
//
// Timing: `start` in cycle 0 loads, planes are processed in cycles 1..P,
// `done` is a one-cycle pulse in cycle P+1, and
// `result` holds its value until the next `start`. `busy` is high in between.
// The LUT is a constant table built at elaboration from C; the bit-serial
// scheme and the LUT contents follow the document, the handshake is this
// design's own.
module da_unit #(
  parameter int unsigned N        = 5,
  parameter int unsigned P        = 10,
  parameter int unsigned LW       = 11,
  parameter bit          SIGN_TOP = 1'b1,
  parameter int          C [N]    = '{default: 0}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [P-1:0]              lane_word [N],
  output logic                      busy,
  output logic                      done,
  output logic signed [LW+P:0]      result
);
  localparam int unsigned AW = LW + P + 1;
  localparam int unsigned CW = $clog2(P + 1);

  typedef logic signed [LW-1:0] lut_t;

  function automatic lut_t lut_entry(input int a);
    int s = 0;
    for (int i = 0; i < int'(N); i++) if (a[i]) s += C[i];
    return lut_t'(s);
  endfunction

  // constant look-up table, 2^N words
  lut_t lut [2**N];
  for (genvar a = 0; a < 2**N; a++) begin : g_lut
    assign lut[a] = lut_entry(a);
  end

  logic [P-1:0]         sr [N];
  logic [CW-1:0]        cnt;
  logic [N-1:0]         addr;
  logic signed [AW-1:0] acc, acc_next, term;
  lut_t                 lut_q;

  always_comb begin
    for (int i = 0; i < int'(N); i++) addr[i] = sr[i][0];
    lut_q = lut[addr];
    term  = AW'(lut_q) <<< P;
    if (SIGN_TOP && (cnt == CW'(P - 1))) acc_next = (acc - term) >>> 1;
    else                                 acc_next = (acc + term) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      acc  <= '0;
      for (int i = 0; i < int'(N); i++) sr[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
        acc  <= '0;
        for (int i = 0; i < int'(N); i++) sr[i] <= lane_word[i];
      end else if (busy) begin
        acc <= acc_next;
        for (int i = 0; i < int'(N); i++) sr[i] <= sr[i] >> 1;
        cnt <= cnt + 1'b1;
        if (cnt == CW'(P - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign result = acc;

endmodule
