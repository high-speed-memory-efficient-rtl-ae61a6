// dtcwt2d_tb: self-checking testbench of the 2D DTCWT unit on small frames.
//
// Streams NFR frames of IMG_W x IMG_H samples (random, plus rows of
// alternating extreme values that make the row high-pass outputs saturate)
// with random gaps on the input and random back-pressure on the output. The
// expected outputs come from a direct model here: row FIR + requantise, then
// column FIR, then requantise (raw) or sum/difference (sb2d). It checks every
// output value, its position tags and out_last, the number of outputs, and
// counts the mechanisms: input stalls, output back-pressure, saturations (which
// must match the model's count) and column passes.
module dtcwt2d_tb;
  import dtcwt_pkg::*;
  import dtcwt_ref_pkg::*;

  localparam int IMG_W = 24;
  localparam int IMG_H = 22;
  localparam int NFR = 2;
  localparam int NOX = (IMG_W - 10) / 2 + 1;
  localparam int NOY = (IMG_H - 10) / 2 + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last, clip;
  samp_t in_px = '0;
  samp_t raw [16];
  logic signed [YW:0] sb2d [16];
  logic [$clog2(IMG_H)-1:0] out_row;
  logic [$clog2(IMG_W)-1:0] out_col;

  dtcwt2d #(.ARCH(ARCH_OMDA1), .IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  int img [NFR][IMG_H][IMG_W];
  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_bp = 0, n_clip = 0, n_clip_ref = 0, n_pass = 0, n_out = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected column outputs of frame fi at (oy, ox): C[fr][fc]
  function automatic void model(input int fi, input int oy, input int ox, output longint c [4][4]);
    int rw [10];
    int cw [4][10];
    for (int fr = 0; fr < 4; fr++)
      for (int k = 0; k < 10; k++) begin
        for (int j = 0; j < 10; j++) rw[j] = img[fi][2*oy + k][2*ox + j];
        cw[fr][k] = rreq(rfir(fr, rw));
      end
    for (int fr = 0; fr < 4; fr++)
      for (int fc = 0; fc < 4; fc++) c[fr][fc] = rfir(fc, cw[fr]);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    int rw [10];
    for (int f = 0; f < NFR; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++)
          img[f][y][x] = (y % 5 == 2) ? ((x % 2 == 0) ? 511 : -512) : int'(samp_t'($urandom));
    for (int f = 0; f < NFR; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int ox = 0; ox < NOX; ox++) begin
          for (int j = 0; j < 10; j++) rw[j] = img[f][y][2*ox + j];
          for (int fr = 0; fr < 4; fr++) if (rclips(rfir(fr, rw))) begin
            n_clip_ref++;
            break;
          end
        end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          @(negedge clk);
          while ($urandom_range(0, 7) == 0) @(negedge clk);
          in_valid = 1'b1;
          in_px = samp_t'(img[f][y][x]);
          @(posedge clk);
          while (!in_ready) begin
            n_stall++;
            @(posedge clk);
          end
          @(negedge clk);
          in_valid = 1'b0;
        end
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (clip) n_clip++;
    if (out_valid && !out_ready) n_bp++;
  end

  // output checking
  initial begin
    longint c [4][4];
    @(posedge rst_n);
    for (int f = 0; f < NFR; f++)
      for (int oy = 0; oy < NOY; oy++) begin
        n_pass++;
        for (int ox = 0; ox < NOX; ox++) begin
          do @(posedge clk); while (!(out_valid && out_ready));
          n_out++;
          model(f, oy, ox, c);
          chk(int'(out_row) == oy && int'(out_col) == ox,
              $sformatf("position %0d,%0d expected %0d,%0d", out_row, out_col, oy, ox));
          chk(out_last == (oy == NOY - 1 && ox == NOX - 1), "out_last");
          for (int fr = 0; fr < 4; fr++)
            for (int fc = 0; fc < 4; fc++)
              chk(int'(raw[fr*4 + fc]) == rreq(c[fr][fc]),
                  $sformatf("f%0d (%0d,%0d) raw[%0d][%0d] %0d vs %0d", f, oy, ox, fr, fc,
                            raw[fr*4 + fc], rreq(c[fr][fc])));
          for (int dr = 0; dr < 2; dr++)
            for (int dc = 0; dc < 2; dc++)
              for (int j = 0; j < 4; j++)
                chk(longint'(sb2d[(dr*2 + dc)*4 + j]) ==
                    rsd2(j, c[dr][dc], c[2+dr][dc], c[dr][2+dc], c[2+dr][2+dc]),
                    $sformatf("sb2d type %0d j %0d", dr*2 + dc, j));
        end
      end
    repeat (50) @(posedge clk);
    chk(!out_valid, "no extra output");
    chk(n_clip == n_clip_ref, $sformatf("saturations %0d expected %0d", n_clip, n_clip_ref));
    chk(n_stall > 0, "input stall never happened");
    chk(n_bp > 0, "output back-pressure never happened");
    chk(n_clip > 0, "saturation never happened");
    chk(n_pass == NFR * NOY, "column passes");
    $display("mechanisms: stalls=%0d backpressure=%0d saturations=%0d column_passes=%0d outputs=%0d",
             n_stall, n_bp, n_clip, n_pass, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
