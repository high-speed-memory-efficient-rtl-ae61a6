// sa_lvt_filter: one 10-tap filter in the look-up-table form of the reduced
// modular (DROP_ZERO = 0) and optimised reduced modular (DROP_ZERO = 1)
// systolic architectures.
//
// The taps are split into two halves (0-4 and 5-9), each with its own LVT.
// Every sample is held as a 5-bit LSB half and a 5-bit MSB half; per lane a
// 2:1 multiplexer alternates between the two halves, so one LVT serves both:
// even cycles present an LSB-half bit plane, odd cycles the matching MSB-half
// plane. A demultiplexer after the LVT steers the word to the LSB or MSB
// accumulator, each a right-shift accumulator (RSR). After 10 cycles
//   y = sum_halves (acc_lsb + 2^5 * acc_msb)
// With DROP_ZERO the lanes of the zero coefficients (taps 0 and 9, zero in all
// four filters) are removed and each LVT has 16 words instead of 32.
// The LSB/MSB registers, multiplexers, LVT sizes (2^5 and 2^4 words) and the
// dropped lane follow the document; the alternating schedule is this design's
// reading of its even/odd split. The bit-9 plane is the sign plane.
//
// Interface as rmda1_filter; `done` pulses 11 cycles after `start`
// (one load cycle, 10 alternating planes).
module sa_lvt_filter
  import dtcwt_pkg::*;
#(
  parameter int FILT      = 0,    // 0 H0a, 1 H1a, 2 H0b, 3 H1b
  parameter bit DROP_ZERO = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  samp_t x [NTAP],
  output logic  busy,
  output logic  done,
  output fout_t y
);
  localparam int NL = DROP_ZERO ? 4 : 5;       // lanes per LVT
  localparam int HP = DW / 2;                  // bits per half
  localparam int LW = 11;
  localparam int AW = LW + HP + 1;
  typedef logic signed [LW-1:0] lvt_t;
  typedef logic signed [AW-1:0] acc_t;

  // tap index of lane l of half h
  function automatic int tap(input int h, input int l);
    return h * 5 + l + ((DROP_ZERO && h == 0) ? 1 : 0);
  endfunction

  function automatic lvt_t lvt_entry(input int h, input int a);
    int s = 0;
    for (int l = 0; l < NL; l++) if (a[l]) s += coef(FILT, tap(h, l));
    return lvt_t'(s);
  endfunction

  lvt_t lvt [2][2**NL];
  for (genvar h = 0; h < 2; h++) begin : g_h
    for (genvar a = 0; a < 2**NL; a++) begin : g_a
      assign lvt[h][a] = lvt_entry(h, a);
    end
  end

  logic [HP-1:0] lsb_r [2][NL];
  logic [HP-1:0] msb_r [2][NL];
  acc_t          acc_l [2];
  acc_t          acc_m [2];
  logic [3:0]    cyc;                          // 0..9
  logic          sel;                          // 0: LSB half, 1: MSB half
  logic [NL-1:0] addr [2];
  lvt_t          word [2];
  acc_t          term [2];

  assign sel = cyc[0];

  always_comb
    for (int h = 0; h < 2; h++) begin
      for (int l = 0; l < NL; l++) addr[h][l] = sel ? msb_r[h][l][0] : lsb_r[h][l][0];
      word[h] = lvt[h][addr[h]];
      term[h] = acc_t'(word[h]) <<< HP;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cyc  <= '0;
      for (int h = 0; h < 2; h++) begin
        acc_l[h] <= '0;
        acc_m[h] <= '0;
        for (int l = 0; l < NL; l++) begin
          lsb_r[h][l] <= '0;
          msb_r[h][l] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cyc  <= '0;
        for (int h = 0; h < 2; h++) begin
          acc_l[h] <= '0;
          acc_m[h] <= '0;
          for (int l = 0; l < NL; l++) begin
            lsb_r[h][l] <= x[tap(h, l)][HP-1:0];
            msb_r[h][l] <= x[tap(h, l)][DW-1:HP];
          end
        end
      end else if (busy) begin
        cyc <= cyc + 1'b1;
        for (int h = 0; h < 2; h++) begin
          if (!sel) begin
            acc_l[h] <= (acc_l[h] + term[h]) >>> 1;
            for (int l = 0; l < NL; l++) lsb_r[h][l] <= lsb_r[h][l] >> 1;
          end else begin
            // last MSB-half plane is the sign plane
            if (cyc == 4'd9) acc_m[h] <= (acc_m[h] - term[h]) >>> 1;
            else             acc_m[h] <= (acc_m[h] + term[h]) >>> 1;
            for (int l = 0; l < NL; l++) msb_r[h][l] <= msb_r[h][l] >> 1;
          end
        end
        if (cyc == 4'd9) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign y = fout_t'(acc_l[0]) + fout_t'(acc_l[1]) + ((fout_t'(acc_m[0]) + fout_t'(acc_m[1])) <<< HP);

endmodule
