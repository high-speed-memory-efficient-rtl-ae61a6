// omda1_filter_tb: self-checking testbench of omda1_filter.
//
// Instantiates the filter for all four DTCWT filters (H0a, H1a, H0b, H1b),
// applies random 10-sample windows plus the extreme windows (all most
// negative, all most positive, alternating) and compares every output with a
// direct sum of coefficient * sample computed here. It also checks that
// `done` arrives exactly LAT cycles after `start` and that `busy` is high in
// between.
module omda1_filter_tb;
  import dtcwt_pkg::*;

  localparam int LAT = 14;
  localparam int NRAND = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0;
  samp_t      x [NTAP];
  logic [3:0] busy, done;
  fout_t      y [4];

  for (genvar f = 0; f < 4; f++) begin : g_dut
    omda1_filter #(.FILT(f)) dut (
      .clk, .rst_n, .start, .x, .busy(busy[f]), .done(done[f]), .y(y[f]));
  end

  int checks = 0;
  int failures = 0;

  function automatic longint ref_fir(input int f, input samp_t w [NTAP]);
    longint s = 0;
    for (int k = 0; k < int'(NTAP); k++) s += longint'(dtcwt_ref_pkg::rcoef(f, k)) * longint'(w[k]);
    return s;
  endfunction

  task automatic run_window(input samp_t w [NTAP]);
    int n;
    @(negedge clk);
    x = w;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (done[0] !== 1'b1 && n < 100) begin
      checks++;
      if (busy !== 4'hf) begin
        failures++;
        $display("FAIL busy low before done, cycle %0d", n);
      end
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", n, LAT);
    end
    checks++;
    if (done !== 4'hf) begin
      failures++;
      $display("FAIL done not simultaneous: %b", done);
    end
    for (int f = 0; f < 4; f++) begin
      checks++;
      if (longint'(y[f]) != ref_fir(f, w)) begin
        failures++;
        if (failures < 20) $display("FAIL filter %0d: got %0d expected %0d", f, y[f], ref_fir(f, w));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samp_t w [NTAP];
    for (int k = 0; k < int'(NTAP); k++) x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < int'(NTAP); k++) w[k] = samp_t'(-512);
    run_window(w);
    for (int k = 0; k < int'(NTAP); k++) w[k] = samp_t'(511);
    run_window(w);
    for (int k = 0; k < int'(NTAP); k++) w[k] = (k % 2 == 0) ? samp_t'(511) : samp_t'(-512);
    run_window(w);
    for (int k = 0; k < int'(NTAP); k++) w[k] = (k % 2 == 1) ? samp_t'(511) : samp_t'(-512);
    run_window(w);
    for (int i = 0; i < NRAND; i++) begin
      for (int k = 0; k < int'(NTAP); k++) w[k] = samp_t'($urandom);
      run_window(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
