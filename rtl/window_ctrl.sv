// window_ctrl: control logic for the windowed convolution and the padding of
// the frame borders.
//
// The block counts the window sliding steps (one per element shifted into
// the window register file) and decides, from the configuration registers,
// when the gateway has to compute and which window cells lie outside the
// frame:
//   * After a clear it waits until element SC has entered; from then on the
//     window is full and every further step is a window position.  Window
//     position s = 0..EOF has its top-left cell at frame row s / Nf and
//     column s mod Nf, where Nf = FD + WS is the frame width; its output
//     belongs to the centre cell, L rows and columns further on.
//   * Every window position gets one SM_START pulse; SM_CLK_EN stays high
//     while the convolution runs so that the gateway's remaining steps run.
//   * LEFT_BORDER flags window columns that have wrapped past the right
//     edge of the frame into the left border of the next row; window column
//     c (0 = newest) is outside when (s mod Nf) > FD + c.
//   * DOWN_BORDER flags window rows below the last frame row; window row r
//     (0 = newest) is outside when s >= DB + r*Nf.
//   * End_Proc_Frame marks the last window position of a frame (s = EOF);
//     the next step starts the next frame at s = 0, so frames may follow
//     each other without a gap.
// Flagged cells read as zero in the gateway.
//
// The register parameters (Table of FD, SC, WS, DB, EOF), the output names
// and the padding with zeros come from the design; how the counters use the
// parameters, the per-row/per-column flag vectors and the continuous frame
// stream are this design's reading of them.
//
// Timing: all outputs are registered and change on the clock edge on which
// shift_en is seen, i.e. together with the window registers.  sm_start and
// end_proc_frame are one-cycle pulses.
module window_ctrl #(
  parameter int N  = 64,                 // largest frame size
  parameter int L  = 1,                  // window half-width
  parameter int WS = 2 * L + 1,          // window size
  parameter int CW = $clog2(N * N + 1)   // configuration register width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          shift_en,
  input  logic [CW-1:0] fd,
  input  logic [CW-1:0] sc,
  input  logic [CW-1:0] ws,
  input  logic [CW-1:0] db,
  input  logic [CW-1:0] eof,
  output logic          sm_start,
  output logic          sm_clk_en,
  output logic [WS-1:0] left_border,
  output logic [WS-1:0] down_border,
  output logic          end_proc_frame,
  output logic          active,          // convolution running
  output logic [CW-1:0] pos              // current window position s
);

  logic [CW-1:0] fill_cnt;   // elements seen before the window is full
  logic [CW-1:0] col;        // s mod Nf
  logic [CW-1:0] nf;         // frame width Nf = FD + WS

  logic          act_n;
  logic [CW-1:0] pos_n, col_n;
  logic [WS-1:0] lb_n, db_n;

  assign nf = fd + ws;

  always_comb begin
    act_n = active | (fill_cnt == sc);
    if (!active) begin
      pos_n = '0;
      col_n = '0;
    end else if (pos == eof) begin
      pos_n = '0;
      col_n = '0;
    end else begin
      pos_n = pos + CW'(1);
      col_n = (col == nf - CW'(1)) ? '0 : col + CW'(1);
    end
    for (int c = 0; c < WS; c++)
      lb_n[c] = 32'(col_n) > 32'(fd) + c;
    for (int r = 0; r < WS; r++)
      db_n[r] = 32'(pos_n) >= 32'(db) + r * 32'(nf);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt       <= '0;
      active         <= 1'b0;
      pos            <= '0;
      col            <= '0;
      sm_start       <= 1'b0;
      sm_clk_en      <= 1'b0;
      left_border    <= '0;
      down_border    <= '0;
      end_proc_frame <= 1'b0;
    end else if (clear) begin
      fill_cnt       <= '0;
      active         <= 1'b0;
      pos            <= '0;
      col            <= '0;
      sm_start       <= 1'b0;
      sm_clk_en      <= 1'b0;
      left_border    <= '0;
      down_border    <= '0;
      end_proc_frame <= 1'b0;
    end else begin
      sm_start       <= 1'b0;
      end_proc_frame <= 1'b0;
      if (shift_en) begin
        if (!active && !act_n) fill_cnt <= fill_cnt + CW'(1);
        active    <= act_n;
        sm_clk_en <= act_n;
        if (act_n) begin
          pos            <= pos_n;
          col            <= col_n;
          left_border    <= lb_n;
          down_border    <= db_n;
          sm_start       <= 1'b1;
          end_proc_frame <= (pos_n == eof);
        end
      end
    end
  end

endmodule
