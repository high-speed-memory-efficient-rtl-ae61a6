// sa_pe_tb: self-checking testbench of the systolic processing element.
//
// Drives random sequences of (coefficient, valid, SCV bit, sample) and checks
// every cycle that the coefficient, valid, SCV bit and sample come out one
// cycle later, and that the plain and sign-changed accumulators equal the
// running sums computed here. `clr` is pulsed between sequences.
module sa_pe_tb;
  import dtcwt_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              clr = 1'b0;
  logic signed [8:0] c_in = '0, c_out;
  logic              cv_in = 1'b0, cv_out, scv_in = 1'b0, scv_out;
  samp_t             x_in = '0, x_out;
  fout_t             acc_p, acc_s;

  sa_pe #(.CWID(9)) dut (.*);

  int checks = 0;
  int failures = 0;
  longint sp, ss;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [8:0] pc;
    logic              pcv, pscv;
    samp_t             px;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int seq = 0; seq < 50; seq++) begin
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      sp = 0;
      ss = 0;
      chk(acc_p == 0 && acc_s == 0, "clear");
      for (int i = 0; i < 12; i++) begin
        pc   = 9'($urandom_range(0, 356)) - 9'sd178;
        pcv  = ($urandom_range(0, 3) != 0);
        pscv = 1'($urandom);
        px   = samp_t'($urandom);
        c_in = pc; cv_in = pcv; scv_in = pscv; x_in = px;
        @(negedge clk);
        if (pcv) begin
          sp += longint'(pc) * longint'(px);
          ss += pscv ? -(longint'(pc) * longint'(px)) : longint'(pc) * longint'(px);
        end
        chk(c_out == pc && cv_out == pcv && scv_out == pscv && x_out == px, "pass-through");
        chk(longint'(acc_p) == sp, $sformatf("plain acc %0d vs %0d", acc_p, sp));
        chk(longint'(acc_s) == ss, $sformatf("scv acc %0d vs %0d", acc_s, ss));
      end
      cv_in = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
