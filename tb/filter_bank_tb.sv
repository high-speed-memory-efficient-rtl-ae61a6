// filter_bank_tb: self-checking testbench of the filter bank in every
// architecture.
//
// Seven banks (RMDA-1, RMDA-2, OMDA-1, OMDA-2, PE array, RMSA, ORMSA) get the
// same windows; each of their four outputs must equal the direct FIR of the
// window, and each bank's `done` must come after its own latency: 11, 6, 14,
// 8, 12, 11 and 11 cycles.
module filter_bank_tb;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int LAT [7] = '{11, 6, 14, 8, 12, 11, 11};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0;
  samp_t      x [NTAP];
  logic [6:0] busy, done;
  fout_t      y [7][4];

  for (genvar a = 0; a < 7; a++) begin : g_dut
    filter_bank #(.ARCH(arch_e'(a))) dut (
      .clk, .rst_n, .start, .x, .busy(busy[a]), .done(done[a]), .y(y[a]));
  end

  int checks = 0;
  int failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input samp_t w [NTAP]);
    int n;
    int seen [7];
    int win [10];
    for (int k = 0; k < 10; k++) win[k] = int'(w[k]);
    for (int a = 0; a < 7; a++) seen[a] = 0;
    @(negedge clk);
    x = w;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1;
    while (busy != 0 && n < 100) begin
      for (int a = 0; a < 7; a++) if (done[a] && seen[a] == 0) seen[a] = n;
      @(negedge clk);
      n++;
    end
    for (int a = 0; a < 7; a++) if (done[a] && seen[a] == 0) seen[a] = n;
    for (int a = 0; a < 7; a++) begin
      chk(seen[a] == LAT[a], $sformatf("arch %0d latency %0d expected %0d", a, seen[a], LAT[a]));
      for (int f = 0; f < 4; f++)
        chk(longint'(y[a][f]) == rfir(f, win),
            $sformatf("arch %0d filter %0d: %0d vs %0d", a, f, y[a][f], rfir(f, win)));
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
    run(w);
    for (int k = 0; k < int'(NTAP); k++) w[k] = samp_t'(511);
    run(w);
    for (int r = 0; r < 300; r++) begin
      for (int k = 0; k < int'(NTAP); k++) w[k] = samp_t'($urandom);
      run(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
