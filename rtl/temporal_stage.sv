// temporal_stage: third (z3, time) stage of the level-1 3D DTCWT.
//
// It accepts, for one position of the decimated 2D grid, the 16 requantised
// 2D tree outputs of all M frames (in_raw[frame][4*fr + fc]). Sixteen
// temporal filter banks (one per 2D tree output, each H0a, H1a, H0b, H1b along
// time) then run over the temporal windows frames 2t .. 2t+9,
// t = 0 .. NT-1 with NT = (M-10)/2 + 1, one window after the other. For each
// window eight sigma_delta3d stages (one per subband type: low/high along
// row, column and time) combine the tree outputs aaa, bba, bab and abb into
// four real subbands, giving out_sb[4*type + j], type = 4*dr + 2*dc + dt:
// type 0 holds the 4 low-pass subbands, types 1..7 the 28 high-pass ones.
//
// Flow control: in_ready is high while idle; after in_valid the stage is busy
// for NT windows and presents each result for one cycle with out_valid
// (no back-pressure) and the window index out_t. Position tags are passed
// through. Filter banks and the Sigma/Delta after the temporal filters follow
// the document; serialising the temporal windows on one set of banks and
// forming only the real parts' terms are this design's choices.
module temporal_stage
  import dtcwt_pkg::*;
#(
  parameter arch_e       ARCH = ARCH_OMDA1,
  parameter int unsigned M    = 52,
  parameter int unsigned TAGW = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  samp_t                 in_raw [M][16],
  input  logic [TAGW-1:0]       in_tag,
  output logic                  out_valid,
  output logic signed [YW+1:0]  out_sb [32],
  output logic [$clog2((M-NTAP)/2+2)-1:0] out_t,
  output logic [TAGW-1:0]       out_tag,
  output logic                  out_last_t
);
  localparam int unsigned NT = (M - NTAP) / 2 + 1;
  localparam int unsigned TW = $clog2(NT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_OUT} state_e;
  state_e state;

  samp_t         buf_q [M][16];
  logic [TW-1:0] tw;
  samp_t         twin [16][NTAP];
  logic [15:0]   tb_busy, tb_done;
  fout_t         ty [16][4];       // ty[2D tree output][temporal filter]
  logic          tb_start;

  always_comb
    for (int s = 0; s < 16; s++)
      for (int k = 0; k < int'(NTAP); k++) twin[s][k] = buf_q[2*int'(tw) + k][s];

  assign tb_start = (state == S_START);

  for (genvar s = 0; s < 16; s++) begin : g_tb
    filter_bank #(.ARCH(ARCH)) u_tb (
      .clk, .rst_n, .start(tb_start), .x(twin[s]), .busy(tb_busy[s]), .done(tb_done[s]),
      .y(ty[s]));
  end

  // type (dr, dc, dt); tree filter index = 2*tree + d; 2D output = 4*fr + fc
  for (genvar dr = 0; dr < 2; dr++) begin : g_r
    for (genvar dc = 0; dc < 2; dc++) begin : g_c
      for (genvar dt = 0; dt < 2; dt++) begin : g_t
        localparam int T = dr * 4 + dc * 2 + dt;
        logic signed [YW+1:0] o [4];
        sigma_delta3d #(.W(YW)) u_sd (
          .aaa(ty[(dr)     * 4 + (dc)    ][dt]),
          .bba(ty[(2 + dr) * 4 + (2 + dc)][dt]),
          .bab(ty[(2 + dr) * 4 + (dc)    ][2 + dt]),
          .abb(ty[(dr)     * 4 + (2 + dc)][2 + dt]),
          .o);
        for (genvar j = 0; j < 4; j++) begin : g_o
          assign out_sb[T*4 + j] = o[j];
        end
      end
    end
  end

  assign in_ready   = (state == S_IDLE);
  assign out_valid  = (state == S_OUT);
  assign out_t      = tw;
  assign out_last_t = (int'(tw) == NT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      tw      <= '0;
      out_tag <= '0;
      for (int f = 0; f < int'(M); f++)
        for (int s = 0; s < 16; s++) buf_q[f][s] <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          buf_q   <= in_raw;
          out_tag <= in_tag;
          tw      <= '0;
          state   <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  if (&tb_done) state <= S_OUT;
        S_OUT: begin
          if (int'(tw) == NT - 1) begin
            state <= S_IDLE;
          end else begin
            tw    <= tw + 1'b1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
