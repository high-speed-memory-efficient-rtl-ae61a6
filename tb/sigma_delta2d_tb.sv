// sigma_delta2d_tb: checks the 2D sum/difference stage on random and extreme
// operands against re_a = r-u, re_b = r+u, im_a = t1+t2, im_b = t2-t1.
module sigma_delta2d_tb;
  import dtcwt_ref_pkg::*;
  localparam int W = 20;
  logic signed [W-1:0] r, t1, t2, u;
  logic signed [W:0]   re_a, re_b, im_a, im_b;
  sigma_delta2d #(.W(W)) dut (.*);

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [4];
    for (int i = 0; i < 2000; i++) begin
      if (i < 16) begin
        r  = i[0] ? -(2**(W-1)) : 2**(W-1) - 1;
        t1 = i[1] ? -(2**(W-1)) : 2**(W-1) - 1;
        t2 = i[2] ? -(2**(W-1)) : 2**(W-1) - 1;
        u  = i[3] ? -(2**(W-1)) : 2**(W-1) - 1;
      end else begin
        r = W'($urandom); t1 = W'($urandom); t2 = W'($urandom); u = W'($urandom);
      end
      @(negedge clk);
      for (int j = 0; j < 4; j++) e[j] = rsd2(j, r, t1, t2, u);
      checks += 4;
      if (longint'(re_a) != e[0]) failures++;
      if (longint'(re_b) != e[1]) failures++;
      if (longint'(im_a) != e[2]) failures++;
      if (longint'(im_b) != e[3]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
