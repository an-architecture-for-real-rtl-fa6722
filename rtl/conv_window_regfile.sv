// conv_window_regfile: convolution window register file.
//
// A (2L+1)x(2L+1) block of registers that always holds the 2-D STFT elements
// under the convolution window as the window slides over the N x N frequency
// plane.  Elements enter in raster order (k2 fastest) at register 0.  Each
// window row is a parallel-in parallel-out shift chain of 2L+1 registers; the
// end of a row feeds a FIFO delay of N-(2L+1) steps whose output feeds the
// start of the next row, so register (r,c) holds the element that entered
// r*N + c steps ago.  With the newest element at S(k1+L, k2+L), register
// (r,c) therefore holds S(k1+L-r, k2+L-c), and its address r*(2L+1)+c is the
// address the gateway multiplexers use (register 4 is the centre for L=1).
//
// Structure, register numbering and the 2L FIFO delays follow the design.
// The runtime FIFO length (input fd) lets smaller frames than N be processed.
//
// Interface: on a clock edge with `shift` high one element `din` enters and
// the window slides one position; `win` shows the registers.  `clear` zeroes
// the registers and restarts the FIFOs.
module conv_window_regfile #(
  parameter int W  = 8,                    // element width
  parameter int N  = 64,                   // largest frame size
  parameter int L  = 1,                    // window half-width
  parameter int WS = 2 * L + 1,            // window size
  parameter int NW = WS * WS,              // number of window registers
  parameter int FL = N - WS,               // largest FIFO delay
  parameter int LW = $clog2(FL + 1)        // width of fd
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                shift,
  input  logic [LW-1:0]       fd,          // FIFO delay, N_frame-(2L+1)
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] win [NW]
);

  logic signed [W-1:0] regs [WS][WS];
  logic signed [W-1:0] row_in [WS];   // value entering column 0 of each row

  assign row_in[0] = din;

  for (genvar r = 1; r < WS; r++) begin : g_fifo
    logic [W-1:0] fifo_out;
    fifo_delay #(.W(W), .DEPTH(FL), .LW(LW)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .clear (clear),
      .write (shift),
      .len   (fd),
      .din   (regs[r-1][WS-1]),
      .dout  (fifo_out)
    );
    assign row_in[r] = $signed(fifo_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '{default: '0};
    end else if (clear) begin
      regs <= '{default: '0};
    end else if (shift) begin
      for (int r = 0; r < WS; r++) begin
        regs[r][0] <= row_in[r];
        for (int c = 1; c < WS; c++) regs[r][c] <= regs[r][c-1];
      end
    end
  end

  for (genvar r = 0; r < WS; r++) begin : g_row
    for (genvar c = 0; c < WS; c++) begin : g_col
      assign win[r*WS + c] = regs[r][c];
    end
  end

endmodule
