// sigma_delta3d_tb: checks the 3D sum/difference stage on random and extreme
// operands against the four real-part sign combinations.
module sigma_delta3d_tb;
  import dtcwt_ref_pkg::*;
  localparam int W = 20;
  logic signed [W-1:0] aaa, bba, bab, abb;
  logic signed [W+1:0] o [4];
  sigma_delta3d #(.W(W)) dut (.*);

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
    for (int i = 0; i < 2000; i++) begin
      if (i < 16) begin
        aaa = i[0] ? -(2**(W-1)) : 2**(W-1) - 1;
        bba = i[1] ? -(2**(W-1)) : 2**(W-1) - 1;
        bab = i[2] ? -(2**(W-1)) : 2**(W-1) - 1;
        abb = i[3] ? -(2**(W-1)) : 2**(W-1) - 1;
      end else begin
        aaa = W'($urandom); bba = W'($urandom); bab = W'($urandom); abb = W'($urandom);
      end
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(o[j]) != rsd3(j, aaa, bba, bab, abb)) begin
          failures++;
          if (failures < 10) $display("FAIL o[%0d] = %0d", j, o[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
