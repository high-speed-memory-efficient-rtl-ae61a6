// filter_bank: the four filters H0a, H1a, H0b, H1b of one DTCWT filter bank,
// all applied to the same 10-sample window.
//
// ARCH selects how the filters are built: the distributed-arithmetic forms
// (rmda1/rmda2/omda1/omda2_filter), the look-up-table systolic forms
// (sa_lvt_filter) or the two-row PE array (sa_array with one column, which
// yields all four outputs from two multipliers). Nine such banks make a level
// of the 3D transform: one for the rows, four for the columns and four along
// time.
//
// Interface: assert `start` with the window x[0..9] while `busy` is low;
// `done` pulses when all four results are ready in y[F_H0A..F_H1B] (full
// precision, gain 256), which then hold until the next start. The latency
// depends on ARCH (see the filter modules).
module filter_bank
  import dtcwt_pkg::*;
#(
  parameter arch_e ARCH = ARCH_OMDA1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  samp_t x [NTAP],
  output logic  busy,
  output logic  done,
  output fout_t y [4]
);
  logic [3:0] b, d;

  if (ARCH == ARCH_SA) begin : g_sa
    fout_t y0a [1], y1a [1], y0b [1], y1b [1];
    sa_array #(.NCOL(1)) u_sa (
      .clk, .rst_n, .start, .x, .busy(b[0]), .done(d[0]),
      .y0a, .y1a, .y0b, .y1b);
    assign b[3:1] = '0;
    assign d[3:1] = {3{d[0]}};
    assign y[F_H0A] = y0a[0];
    assign y[F_H1A] = y1a[0];
    assign y[F_H0B] = y0b[0];
    assign y[F_H1B] = y1b[0];
  end else begin : g_filt
    for (genvar f = 0; f < 4; f++) begin : g_f
      if (ARCH == ARCH_RMDA1) begin : g_rmda1
        rmda1_filter #(.FILT(f)) u_f (.clk, .rst_n, .start, .x, .busy(b[f]), .done(d[f]), .y(y[f]));
      end else if (ARCH == ARCH_RMDA2) begin : g_rmda2
        rmda2_filter #(.FILT(f)) u_f (.clk, .rst_n, .start, .x, .busy(b[f]), .done(d[f]), .y(y[f]));
      end else if (ARCH == ARCH_OMDA1) begin : g_omda1
        omda1_filter #(.FILT(f)) u_f (.clk, .rst_n, .start, .x, .busy(b[f]), .done(d[f]), .y(y[f]));
      end else if (ARCH == ARCH_OMDA2) begin : g_omda2
        omda2_filter #(.FILT(f)) u_f (.clk, .rst_n, .start, .x, .busy(b[f]), .done(d[f]), .y(y[f]));
      end else begin : g_lvt
        sa_lvt_filter #(.FILT(f), .DROP_ZERO(ARCH == ARCH_ORMSA)) u_f (
          .clk, .rst_n, .start, .x, .busy(b[f]), .done(d[f]), .y(y[f]));
      end
    end
  end

  assign busy = |b;
  assign done = &d;

  // handshake rule: a new window may only be started while the bank is idle
  // (busy is 0 during reset, so the rule needs no reset qualifier)
  a_start_idle: assert property (@(posedge clk) start |-> !busy)
    else $error("filter_bank: start while busy");

endmodule
