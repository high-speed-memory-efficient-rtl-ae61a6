// dtcwt3d_top_tb: end-to-end testbench of the level-1 3D DTCWT.
//
// Runs NSET blocks of M frames of IMG_W x IMG_H samples through the
// frame-parallel transform (random samples with some rows of alternating
// extremes, random input gaps) and compares every output with a direct model
// written here: per frame row FIR + requantise, column FIR + requantise,
// then temporal FIR over frames 2t..2t+9 and the real-part sum/difference,
// giving 32 subbands per position and temporal window. The per-frame 2D
// subbands (sb2d) are checked at every transfer. It also drives the
// filter-bank comparison port with random windows and checks all seven
// architectures. Mechanisms counted (each must occur): input stalls,
// back-pressure from the temporal stage to the 2D units, saturation in
// requantisation, column passes, temporal windows, end of a frame block and
// the completion of every comparison architecture.
module dtcwt3d_top_tb;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int M = 12;
  localparam int IMG_W = 20;
  localparam int IMG_H = 20;
  localparam int NSET = 2;
  localparam int NOX = (IMG_W - 10) / 2 + 1;
  localparam int NOY = (IMG_H - 10) / 2 + 1;
  localparam int NT = (M - 10) / 2 + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_last, sb2d_valid, clip;
  samp_t in_px [M];
  logic signed [YW+1:0] out_sb [32];
  logic [$clog2(IMG_H)-1:0] out_row;
  logic [$clog2(IMG_W)-1:0] out_col;
  logic [$clog2((M-10)/2+2)-1:0] out_t;
  logic signed [YW:0] sb2d [M][16];
  logic cmp_start = 1'b0;
  samp_t cmp_x [NTAP];
  logic [6:0] cmp_busy, cmp_done;
  fout_t cmp_y [7][4];

  dtcwt3d_top #(.ARCH(ARCH_OMDA1), .M(M), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  int img [NSET][M][IMG_H][IMG_W];
  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_bp = 0, n_clip = 0, n_pass = 0, n_twin = 0, n_last = 0, n_sb2d = 0;
  int n_cmp [7];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // requantised 2D tree outputs and full column outputs of frame m at (oy, ox)
  function automatic void model2d(input int s, input int m, input int oy, input int ox,
                                  output longint c [4][4]);
    int rw [10];
    int cw [4][10];
    for (int fr = 0; fr < 4; fr++)
      for (int k = 0; k < 10; k++) begin
        for (int j = 0; j < 10; j++) rw[j] = img[s][m][2*oy + k][2*ox + j];
        cw[fr][k] = rreq(rfir(fr, rw));
      end
    for (int fr = 0; fr < 4; fr++)
      for (int fc = 0; fc < 4; fc++) c[fr][fc] = rfir(fc, cw[fr]);
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transform stimulus
  initial begin
    for (int s = 0; s < NSET; s++)
      for (int m = 0; m < M; m++)
        for (int y = 0; y < IMG_H; y++)
          for (int x = 0; x < IMG_W; x++)
            img[s][m][y][x] = (y % 7 == 3) ? (((x + m) % 2 == 0) ? 511 : -512)
                                           : int'(samp_t'($urandom));
    for (int m = 0; m < M; m++) in_px[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSET; s++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 7) == 0) @(negedge clk);
          in_valid = 1'b1;
          for (int m = 0; m < M; m++) in_px[m] = samp_t'(img[s][m][y][x]);
          @(posedge clk);
          while (!in_ready) begin
            n_stall++;
            @(posedge clk);
          end
          @(negedge clk);
          in_valid = 1'b0;
        end
  end

  // filter-bank comparison stimulus and check
  initial begin
    int w [10];
    for (int a = 0; a < 7; a++) n_cmp[a] = 0;
    for (int k = 0; k < 10; k++) cmp_x[k] = '0;
    @(posedge rst_n);
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      for (int k = 0; k < 10; k++) begin
        cmp_x[k] = samp_t'($urandom);
        w[k] = int'(cmp_x[k]);
      end
      cmp_start = 1'b1;
      @(negedge clk);
      cmp_start = 1'b0;
      for (int n = 0; n < 30; n++) begin
        @(posedge clk);
        for (int a = 0; a < 7; a++) if (cmp_done[a]) n_cmp[a]++;
      end
      for (int a = 0; a < 7; a++)
        for (int f = 0; f < 4; f++)
          chk(longint'(cmp_y[a][f]) == rfir(f, w), $sformatf("cmp arch %0d filter %0d", a, f));
    end
  end

  always @(posedge clk) begin
    if (clip) n_clip++;
    if (dut.all_valid && !dut.ts_in_ready) n_bp++;
  end

  // per-frame 2D subbands at every transfer
  initial begin
    longint c [4][4];
    @(posedge rst_n);
    for (int s = 0; s < NSET; s++)
      for (int oy = 0; oy < NOY; oy++)
        for (int ox = 0; ox < NOX; ox++) begin
          do @(posedge clk); while (!sb2d_valid);
          n_sb2d++;
          for (int m = 0; m < M; m++) begin
            model2d(s, m, oy, ox, c);
            for (int dr = 0; dr < 2; dr++)
              for (int dc = 0; dc < 2; dc++)
                for (int j = 0; j < 4; j++)
                  chk(longint'(sb2d[m][(dr*2 + dc)*4 + j]) ==
                      rsd2(j, c[dr][dc], c[2+dr][dc], c[dr][2+dc], c[2+dr][2+dc]),
                      $sformatf("sb2d set %0d frame %0d (%0d,%0d)", s, m, oy, ox));
          end
        end
  end

  // 3D outputs
  initial begin
    longint c [4][4];
    int raw [M][16];
    longint ty [16][4];
    int w [10];
    @(posedge rst_n);
    for (int s = 0; s < NSET; s++)
      for (int oy = 0; oy < NOY; oy++) begin
        n_pass++;
        for (int ox = 0; ox < NOX; ox++) begin
          for (int m = 0; m < M; m++) begin
            model2d(s, m, oy, ox, c);
            for (int fr = 0; fr < 4; fr++)
              for (int fc = 0; fc < 4; fc++) raw[m][fr*4 + fc] = rreq(c[fr][fc]);
          end
          for (int t = 0; t < NT; t++) begin
            do @(posedge clk); while (!out_valid);
            n_twin++;
            if (out_last) n_last++;
            for (int i = 0; i < 16; i++)
              for (int ft = 0; ft < 4; ft++) begin
                for (int k = 0; k < 10; k++) w[k] = raw[2*t + k][i];
                ty[i][ft] = rfir(ft, w);
              end
            chk(int'(out_row) == oy && int'(out_col) == ox && int'(out_t) == t,
                $sformatf("position %0d,%0d,%0d expected %0d,%0d,%0d", out_row, out_col, out_t, oy, ox, t));
            chk(out_last == (oy == NOY - 1 && ox == NOX - 1 && t == NT - 1), "out_last");
            for (int dr = 0; dr < 2; dr++)
              for (int dc = 0; dc < 2; dc++)
                for (int dt = 0; dt < 2; dt++)
                  for (int j = 0; j < 4; j++)
                    chk(longint'(out_sb[(dr*4 + dc*2 + dt)*4 + j]) ==
                        rsd3(j, ty[dr*4 + dc][dt], ty[(2+dr)*4 + 2 + dc][dt],
                             ty[(2+dr)*4 + dc][2+dt], ty[dr*4 + 2 + dc][2+dt]),
                        $sformatf("set %0d (%0d,%0d) t %0d type %0d j %0d", s, oy, ox, t,
                                  dr*4 + dc*2 + dt, j));
          end
        end
      end
    repeat (100) @(posedge clk);
    chk(!out_valid, "no extra output");
    chk(n_sb2d == NSET * NOX * NOY, "sb2d transfers");
    chk(n_stall > 0, "input stall never happened");
    chk(n_bp > 0, "temporal back-pressure never happened");
    chk(n_clip > 0, "saturation never happened");
    chk(n_pass == NSET * NOY, "column passes");
    chk(n_twin == NSET * NOX * NOY * NT, "temporal windows");
    chk(n_last == NSET, "end of frame block");
    for (int a = 0; a < 7; a++) chk(n_cmp[a] == 40, $sformatf("comparison arch %0d completions %0d", a, n_cmp[a]));
    $display("mechanisms: stalls=%0d temporal_backpressure=%0d saturations=%0d column_passes=%0d temporal_windows=%0d block_ends=%0d",
             n_stall, n_bp, n_clip, n_pass, n_twin, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
