// sa_array_tb: self-checking testbench of the 2 x NCOL systolic array.
//
// Loads random (and extreme) windows of 2*NCOL+8 samples and checks, for every
// column j, the four outputs against a direct FIR of the window starting at
// sample 2j: H0a and H1b from the even row, H0b and H1a from the odd row. The
// completion pulse must come NCOL+11 cycles after start.
module sa_array_tb;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int NCOL = 4;
  localparam int NX = 2 * NCOL + 8;
  localparam int LAT = NCOL + 11;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start = 1'b0, busy, done;
  samp_t x [NX];
  fout_t y0a [NCOL], y1a [NCOL], y0b [NCOL], y1b [NCOL];

  sa_array #(.NCOL(NCOL)) dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input samp_t w [NX]);
    int n;
    int win [10];
    @(negedge clk);
    x = w;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < NX; i++) x[i] = samp_t'($urandom);  // must have been latched
    n = 1;
    while (done !== 1'b1 && n < 100) begin
      @(negedge clk);
      n++;
    end
    chk(n == LAT, $sformatf("latency %0d expected %0d", n, LAT));
    for (int j = 0; j < NCOL; j++) begin
      for (int k = 0; k < 10; k++) win[k] = int'(w[2*j + k]);
      chk(longint'(y0a[j]) == rfir(0, win), $sformatf("col %0d H0a %0d vs %0d", j, y0a[j], rfir(0, win)));
      chk(longint'(y1a[j]) == rfir(1, win), $sformatf("col %0d H1a %0d vs %0d", j, y1a[j], rfir(1, win)));
      chk(longint'(y0b[j]) == rfir(2, win), $sformatf("col %0d H0b %0d vs %0d", j, y0b[j], rfir(2, win)));
      chk(longint'(y1b[j]) == rfir(3, win), $sformatf("col %0d H1b %0d vs %0d", j, y1b[j], rfir(3, win)));
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
    samp_t w [NX];
    for (int i = 0; i < NX; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NX; i++) w[i] = samp_t'(-512);
    run(w);
    for (int i = 0; i < NX; i++) w[i] = (i % 3 == 0) ? samp_t'(511) : samp_t'(-512);
    run(w);
    for (int r = 0; r < 300; r++) begin
      for (int i = 0; i < NX; i++) w[i] = samp_t'($urandom);
      run(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
