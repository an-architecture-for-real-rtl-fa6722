// sm2d_top: multiple-clock-cycle system that turns a stream of 2-D STFT
// elements into the 2-D S-method (SM) space/spatial-frequency distribution.
//
// For every element (k1,k2) of an N x N 2-D STFT frame the system computes
//   SM = SM_R + SM_I,
// where SM_R is the sum of products of the real parts of the STFT elements
// placed symmetrically around (k1,k2) inside a (2L+1)x(2L+1) window, and SM_I
// the same sum for the imaginary parts.  A window half-width Lsel of 0 gives
// the 2-D spectrogram |STFT|^2; larger Lsel (up to the built L) move the
// result towards the 2-D Wigner distribution.
//
// Parts, all in one clock domain (clk):
//   config_regs         FD, SC, WS, DB, EOF, written over cfg_din/addr/en
//   clock_sync          turns each rising edge of stft_in_clk into one shift
//   window_ctrl         counts window positions, starts the gateways, flags
//                       window cells outside the frame
//   2 x conv_window_regfile  window registers + FIFO delays (real, imaginary)
//   2 x sm_gateway      one multiplier/shifter/accumulator each, cn(Lsel)
//                       clocks per window position
//   output adder        SM_R + SM_I
// The real computational line and the control follow the design; the
// imaginary line is its copy, as the design states it is identical, and the
// final adder forms SM_R + SM_I.
//
// Interface and timing:
//   stft_in_re/im must be valid when stft_in_clk rises and until the next
//   clk edge; stft_in_clk must be high and low for at least one clk period
//   each, and its period must be at least cn(Lsel) clk periods (cn(0) = 1,
//   cn(1) = 5, cn(2) = 13): the next element may enter during the last step
//   of the previous window position.
//   After a reset or `clear` the first SC elements only fill the window;
//   element SC (counting from 0) starts window position 0, and from then on
//   every element yields one result.  Result number s of a frame
//   (s = 0..EOF) belongs to the centre of the window whose top-left cell is
//   frame element s, i.e. to frame cell (s/Nf + L, s mod Nf + L); cells outside
//   the frame count as zero.  sm_out is valid for one cycle with sm_valid,
//   cn(Lsel) + 5 clk cycles after the strobe edge; sm_eof marks the last
//   result of a frame.  tfd selects Lsel; it is sampled at the start of each
//   window position.
module sm2d_top
  import sm2d_pkg::*;
#(
  parameter int W    = 8,                                  // STFT element width
  parameter int N    = 64,                                 // frame size N x N
  parameter int L    = 1,                                  // window half-width
  parameter int CW   = $clog2(N * N + 1),                  // configuration width
  parameter int TW   = (L > 0) ? $clog2(L + 1) : 1,        // distribution code width
  parameter int AccW = 2 * W + $clog2(2 * (2 * L * L + 2 * L + 1)) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // 2-D STFT input
  input  logic                 stft_in_clk,
  input  logic signed [W-1:0]  stft_in_re,
  input  logic signed [W-1:0]  stft_in_im,
  // configuration
  input  logic [CW-1:0]        cfg_din,
  input  logic [2:0]           cfg_addr,
  input  logic                 cfg_en,
  input  logic [TW-1:0]        tfd,
  // 2-D SM output
  output logic signed [AccW:0] sm_out,
  output logic signed [AccW-1:0] sm_re,
  output logic signed [AccW-1:0] sm_im,
  output logic                 sm_valid,
  output logic                 sm_eof
);

  localparam int WS = 2 * L + 1;
  localparam int NW = WS * WS;
  localparam int FL = N - WS;
  localparam int LW = $clog2(FL + 1);

  // ---------------------------------------------------------------- config
  logic [CW-1:0] fd, sc, ws, db, eof;

  config_regs #(.N(N), .L(L), .CW(CW)) u_cfg (
    .clk, .rst_n, .cfg_din, .cfg_addr, .cfg_en,
    .fd, .sc, .ws, .db, .eof
  );

  // ------------------------------------------------------- input and clock
  logic                shift_en;
  logic [2*W-1:0]      sample;

  clock_sync #(.DW(2 * W)) u_sync (
    .clk, .rst_n,
    .stft_in_clk (stft_in_clk),
    .stft_in     ({stft_in_re, stft_in_im}),
    .shift_en    (shift_en),
    .sample      (sample)
  );

  // --------------------------------------------------------------- control
  logic          sm_start, sm_clk_en, end_proc_frame;
  logic [WS-1:0] left_border, down_border;

  window_ctrl #(.N(N), .L(L), .WS(WS), .CW(CW)) u_wctrl (
    .clk, .rst_n, .clear, .shift_en,
    .fd, .sc, .ws, .db, .eof,
    .sm_start, .sm_clk_en, .left_border, .down_border, .end_proc_frame,
    .active (),
    .pos    ()
  );

  // ----------------------------------------------- two computational lines
  logic signed [W-1:0]    win_re [NW];
  logic signed [W-1:0]    win_im [NW];
  logic signed [AccW-1:0] g_re, g_im;
  logic                   v_re, v_im;

  conv_window_regfile #(.W(W), .N(N), .L(L), .WS(WS), .NW(NW), .FL(FL), .LW(LW)) u_win_re (
    .clk, .rst_n, .clear, .shift (shift_en), .fd (fd[LW-1:0]),
    .din (sample[2*W-1:W]), .win (win_re)
  );
  conv_window_regfile #(.W(W), .N(N), .L(L), .WS(WS), .NW(NW), .FL(FL), .LW(LW)) u_win_im (
    .clk, .rst_n, .clear, .shift (shift_en), .fd (fd[LW-1:0]),
    .din (sample[W-1:0]), .win (win_im)
  );

  sm_gateway #(.W(W), .L(L), .WS(WS), .NW(NW), .TW(TW), .AccW(AccW)) u_gw_re (
    .clk, .rst_n, .ext_reset (clear), .sm_start, .sm_clk_en, .tfd,
    .win (win_re), .left_border, .down_border,
    .sm_out (g_re), .sm_valid (v_re), .busy ()
  );
  sm_gateway #(.W(W), .L(L), .WS(WS), .NW(NW), .TW(TW), .AccW(AccW)) u_gw_im (
    .clk, .rst_n, .ext_reset (clear), .sm_start, .sm_clk_en, .tfd,
    .win (win_im), .left_border, .down_border,
    .sm_out (g_im), .sm_valid (v_im), .busy ()
  );

  // ------------------------------------------------------ SM = SM_R + SM_I
  logic eof_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sm_out   <= '0;
      sm_re    <= '0;
      sm_im    <= '0;
      sm_valid <= 1'b0;
      sm_eof   <= 1'b0;
      eof_pend <= 1'b0;
    end else begin
      sm_valid <= v_re;
      sm_eof   <= v_re & eof_pend;
      if (clear)               eof_pend <= 1'b0;
      else if (end_proc_frame) eof_pend <= 1'b1;
      else if (v_re)           eof_pend <= 1'b0;
      if (v_re) begin
        sm_out <= (AccW + 1)'(g_re) + (AccW + 1)'(g_im);
        sm_re  <= g_re;
        sm_im  <= g_im;
      end
    end
  end

  // Both lines share the control and must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) v_re == v_im)
    else $error("real and imaginary gateways out of step");

endmodule
