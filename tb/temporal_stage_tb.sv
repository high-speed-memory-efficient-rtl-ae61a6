// temporal_stage_tb: self-checking testbench of the temporal (z3) stage.
//
// Feeds random sets of 2D tree outputs for M frames (plus one all-extreme
// set) and checks, for each of the NT temporal windows, the 32 real 3D
// subbands against a direct model (temporal FIR of every 2D tree output, then
// the four real-part sign combinations per subband type), the window index,
// the pass-through tag and out_last_t; also that in_ready stays low while the
// windows are processed (back-pressure towards the 2D units).
module temporal_stage_tb;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int M = 14;
  localparam int NT = (M - 10) / 2 + 1;
  localparam int TAGW = 8;
  localparam int NSET = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_last_t;
  samp_t in_raw [M][16];
  logic [TAGW-1:0] in_tag = '0, out_tag;
  logic signed [YW+1:0] out_sb [32];
  logic [$clog2((M-10)/2+2)-1:0] out_t;

  temporal_stage #(.ARCH(ARCH_OMDA1), .M(M), .TAGW(TAGW)) dut (.*);

  int checks = 0;
  int failures = 0;
  int n_busy = 0;
  int sets [NSET][M][16];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSET; s++)
      for (int m = 0; m < M; m++)
        for (int i = 0; i < 16; i++)
          sets[s][m][i] = (s == 0) ? (((m + i) % 2 == 0) ? 511 : -512) : int'(samp_t'($urandom));
    for (int m = 0; m < M; m++) for (int i = 0; i < 16; i++) in_raw[m][i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSET; s++) begin
      @(negedge clk);
      for (int m = 0; m < M; m++) for (int i = 0; i < 16; i++) in_raw[m][i] = samp_t'(sets[s][m][i]);
      in_tag = TAGW'(s);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) begin
        n_busy++;
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
  end

  initial begin
    longint ty [16][4];
    int w [10];
    @(posedge rst_n);
    for (int s = 0; s < NSET; s++)
      for (int t = 0; t < NT; t++) begin
        do @(posedge clk); while (!out_valid);
        for (int i = 0; i < 16; i++)
          for (int ft = 0; ft < 4; ft++) begin
            for (int k = 0; k < 10; k++) w[k] = sets[s][2*t + k][i];
            ty[i][ft] = rfir(ft, w);
          end
        chk(int'(out_t) == t, "window index");
        chk(int'(out_tag) == s, "tag");
        chk(out_last_t == (t == NT - 1), "out_last_t");
        for (int dr = 0; dr < 2; dr++)
          for (int dc = 0; dc < 2; dc++)
            for (int dt = 0; dt < 2; dt++)
              for (int j = 0; j < 4; j++) begin
                longint e;
                e = rsd3(j, ty[dr*4 + dc][dt], ty[(2+dr)*4 + 2 + dc][dt],
                         ty[(2+dr)*4 + dc][2+dt], ty[dr*4 + 2 + dc][2+dt]);
                chk(longint'(out_sb[(dr*4 + dc*2 + dt)*4 + j]) == e,
                    $sformatf("set %0d t %0d type %0d j %0d: %0d vs %0d", s, t,
                              dr*4 + dc*2 + dt, j, out_sb[(dr*4 + dc*2 + dt)*4 + j], e));
              end
      end
    repeat (40) @(posedge clk);
    chk(!out_valid, "no extra output");
    chk(n_busy > 0, "in_ready never low while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
