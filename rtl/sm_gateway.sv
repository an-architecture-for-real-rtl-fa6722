// sm_gateway: STFT-to-SM gateway, the shared arithmetic kernel.
//
// One multiplier, one 1-bit left shifter and one accumulating adder evaluate
// the 2-D S-method of one window position term by term, one term per clock
// (multiple clock cycle implementation): in each step two multiplexers pick
// two window registers, their product is doubled for the off-centre terms,
// and the accumulator adds it.  Step 0 (the centre term squared, the 2-D
// spectrogram) restarts the accumulator; on the last step the sum is written
// to the output register.  A window cell that lies outside the frame reads
// as zero: the multiplexers see a zero wherever its column is flagged in
// left_border or its row in down_border (zero padding of the frame borders).
//
// The datapath (MUX1, MUX2, MULT, ShLEFT, CumADD, OutREG) and its control by
// a counter and a table follow the design; widths, the padding mask inputs and
// the single-clock timing are this design's choices.  The critical path is
// one multiply, one shift and one add, as for the design.
//
// `ext_reset` (EXT_RESET) abandons an evaluation in progress and clears the
// accumulator; the output register keeps the last stored result.
//
// Timing: the evaluation runs from the cycle of `start` for cn(Lsel) cycles
// (fewer when `en` is held low, which pauses it); sm_out and sm_valid update
// on the clock edge that ends the last step, sm_valid for one cycle.
// `win`, `left_border` and `down_border` must be stable meanwhile.
module sm_gateway
  import sm2d_pkg::*;
#(
  parameter int W    = 8,                                  // STFT element width
  parameter int L    = 1,                                  // window half-width
  parameter int WS   = 2 * L + 1,                          // window size
  parameter int NW   = WS * WS,                            // window registers
  parameter int TW   = (L > 0) ? $clog2(L + 1) : 1,        // TFD code width
  parameter int MAXS = 2 * L * L + 2 * L + 1,              // steps of the largest SM
  parameter int AccW = 2 * W + $clog2(2 * MAXS) + 1        // accumulator width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ext_reset,     // EXT_RESET: abandon, clear
  input  logic                   sm_start,
  input  logic                   sm_clk_en,
  input  logic [TW-1:0]          tfd,
  input  logic signed [W-1:0]    win [NW],
  input  logic [WS-1:0]          left_border,   // window columns to read as 0
  input  logic [WS-1:0]          down_border,   // window rows to read as 0
  output logic signed [AccW-1:0] sm_out,
  output logic                   sm_valid,
  output logic                   busy
);

  localparam int AW = (NW > 1) ? $clog2(NW) : 1;

  logic          step_valid, first, store, shl;
  logic [AW-1:0] sel1, sel2;

  sm_gateway_ctrl #(.L(L), .NW(NW), .AW(AW), .TW(TW), .MAXS(MAXS)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .ext_reset  (ext_reset),
    .start      (sm_start),
    .en         (sm_clk_en),
    .tfd        (tfd),
    .step_valid (step_valid),
    .first      (first),
    .store      (store),
    .sel1       (sel1),
    .sel2       (sel2),
    .shl        (shl),
    .busy       (busy)
  );

  // Window cells with their border padding applied.
  logic signed [W-1:0] pcell [NW];
  for (genvar r = 0; r < WS; r++) begin : g_r
    for (genvar c = 0; c < WS; c++) begin : g_c
      assign pcell[r*WS + c] = (left_border[c] | down_border[r]) ? '0 : win[r*WS + c];
    end
  end

  logic signed [W-1:0]      op1, op2;       // MUX1, MUX2
  logic signed [2*W-1:0]    prod;           // MULT
  logic signed [AccW-1:0]   term;           // ShLEFT
  logic signed [AccW-1:0]   acc, acc_next;  // CumADD

  assign op1      = pcell[sel1];
  assign op2      = pcell[sel2];
  assign prod     = op1 * op2;
  assign term     = shl ? (AccW'(prod) <<< 1) : AccW'(prod);
  assign acc_next = (first ? '0 : acc) + term;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      sm_out   <= '0;
      sm_valid <= 1'b0;
    end else if (ext_reset) begin
      acc      <= '0;
      sm_valid <= 1'b0;
    end else begin
      sm_valid <= step_valid & store;
      if (step_valid) acc <= acc_next;
      if (step_valid && store) sm_out <= acc_next;
    end
  end

endmodule
