// clock_sync: clock and synchronisation stage of the 2-D SM system.
//
// The 2-D STFT samples arrive with their own strobe, STFT_IN_CLK, whose period
// must be at least cn(L) periods of the main clock CLK.  This block brings that
// strobe into the CLK domain through a two-flip-flop synchroniser, detects its
// rising edge and issues a one-cycle shift enable (the design's SHIFT_IN_CLK,
// realised here as a clock enable of the single CLK domain) together with the
// sample.  The sample word travels through registers of the same depth as
// the strobe, so the word that comes out with shift_en is the one that was
// present when the strobe was first seen high.
//
// The block's name and its role come from the design; everything inside is
// this design's own choice, since only the block's name is given.
//
// Timing: shift_en is high for one CLK cycle, after the third rising CLK edge
// that samples stft_in_clk high; sample holds the stft_in taken at the first
// of those edges.  stft_in must be valid when stft_in_clk rises and stay so
// until the next CLK edge; stft_in_clk must stay high and low for at least
// one CLK period each.
module clock_sync #(
  parameter int DW = 16   // width of the sample word
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          stft_in_clk,   // asynchronous sample strobe
  input  logic [DW-1:0] stft_in,       // sample, stable around the strobe edge
  output logic          shift_en,      // one-cycle shift enable
  output logic [DW-1:0] sample         // captured sample, valid with shift_en
);

  logic [2:0]    sync_q;   // [0],[1] synchroniser, [2] previous value
  logic [DW-1:0] data_q0, data_q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q   <= '0;
      data_q0  <= '0;
      data_q1  <= '0;
      shift_en <= 1'b0;
      sample   <= '0;
    end else begin
      sync_q   <= {sync_q[1:0], stft_in_clk};
      data_q0  <= stft_in;
      data_q1  <= data_q0;
      shift_en <= sync_q[1] & ~sync_q[2];
      if (sync_q[1] & ~sync_q[2]) sample <= data_q1;
    end
  end

endmodule
