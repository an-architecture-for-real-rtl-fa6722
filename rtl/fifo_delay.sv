// fifo_delay: programmable delay line between two rows of the convolution
// window register block.
//
// The last register of a window row feeds this delay; its output feeds the
// first register of the next row.  With a length of FD = N-(2L+1) shift steps
// the path from the start of one window row to the start of the next is N
// steps, one frame row.  The delay is a circular buffer: at every write the
// word written FD writes earlier is read out at the pointer, and the new word
// takes its place.
//
// The length N-(2L+1), the WRITE and CLEAR inputs and the FD input come from
// the design; the circular-buffer organisation is this design's choice.
//
// Interface: `len` (1..DEPTH) sets the delay; `write` advances it by one step.
// dout is combinational: it is the word written `len` writes earlier, and it
// is taken by the next row's first register on the same clock edge on which
// din is written.  `clear` resets the pointer only (the stored words are
// ignored downstream by the border padding).
module fifo_delay #(
  parameter int W     = 8,                  // word width
  parameter int DEPTH = 61,                 // largest delay, N-(2L+1)
  parameter int LW    = $clog2(DEPTH + 1)   // width of len
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          write,
  input  logic [LW-1:0] len,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          wrap;

  assign wrap = ({{(32-AW){1'b0}}, ptr} >= 32'(len) - 32'd1) ||
                ({{(32-AW){1'b0}}, ptr} >= DEPTH - 1);
  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (clear) begin
      ptr <= '0;
    end else if (write) begin
      ptr <= wrap ? '0 : ptr + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (write && !clear) mem[ptr] <= din;
  end

endmodule
