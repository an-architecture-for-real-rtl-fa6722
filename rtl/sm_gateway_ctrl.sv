// sm_gateway_ctrl: control logic of the STFT-to-SM gateway.
//
// A binary step counter and a look-up table drive the shared multiplier and
// accumulator of the gateway through the cn(Lsel) = 2*Lsel^2 + 2*Lsel + 1
// steps of one S-method evaluation.  The distribution code (TFD code) selects
// Lsel: 0 gives the 2-D spectrogram (one step), 1..L the 2-D SM with that
// window half-width.  The table is indexed by {TFD code, step} and returns
// the addresses of the two window registers to multiply (SelSTFT_1,
// SelSTFT_2), whether the product is doubled by the left shifter (ShLorNo)
// and whether this is the last step, on which the sum is stored (SMStore)
// and the counter returns to zero (internal reset).  The table is a ROM
// computed at elaboration from sm2d_pkg::term_code.
//
// The counter + table organisation and the signal roles follow the design;
// the term order, the clamping of codes above L to L, EXT_RESET acting synchronously and the
// handshake below
// are this design's choices.
//
// Timing: `start` (SM_START) executes step 0 in the same cycle and latches the
// code; afterwards one step is executed in every cycle in which `en`
// (SM_CLK_EN) is high, until the last step.  `step_valid` marks a cycle in
// which the outputs describe a step to execute; `first` marks step 0, `store`
// the last step.
module sm_gateway_ctrl
  import sm2d_pkg::*;
#(
  parameter int L    = 1,                                  // window half-width
  parameter int NW   = (2 * L + 1) * (2 * L + 1),          // window registers
  parameter int AW   = (NW > 1) ? $clog2(NW) : 1,          // register address width
  parameter int TW   = (L > 0) ? $clog2(L + 1) : 1,        // TFD code width
  parameter int MAXS = 2 * L * L + 2 * L + 1,              // steps of the largest SM
  parameter int SW   = (MAXS > 1) ? $clog2(MAXS) : 1       // step counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ext_reset,   // EXT_RESET: abandon the evaluation
  input  logic          start,       // SM_START: begin a new evaluation
  input  logic          en,          // SM_CLK_EN: allow the following steps
  input  logic [TW-1:0] tfd,         // distribution code, Lsel
  output logic          step_valid,  // a step executes in this cycle
  output logic          first,       // step 0: accumulator starts afresh
  output logic          store,       // last step: result goes to the output
  output logic [AW-1:0] sel1,        // SelSTFT_1
  output logic [AW-1:0] sel2,        // SelSTFT_2
  output logic          shl,         // ShLorNo: double the product
  output logic          busy
);

  typedef struct packed {
    logic [AW-1:0] a1;
    logic [AW-1:0] a2;
    logic          dbl;
  } lut_entry_t;

  // ROM contents: entry s of the shared schedule, and the last step per code.
  lut_entry_t         lut      [MAXS];
  logic [SW-1:0]      last_step[L + 1];

  for (genvar s = 0; s < MAXS; s++) begin : g_lut
    localparam int CODE = term_code(L, s);
    assign lut[s] = '{a1: AW'(CODE & 12'hfff), a2: AW'((CODE >> 12) & 12'hfff),
                      dbl: 1'((CODE >> 24) & 1)};
  end
  for (genvar t = 0; t <= L; t++) begin : g_last
    assign last_step[t] = SW'(cn(t) - 1);
  end

  logic [TW-1:0] tfd_q, tfd_clamped, code;
  logic [SW-1:0] cnt, step;
  logic          running;

  // TFD decoder: codes beyond the built window are taken as the largest SM.
  if ((1 << TW) - 1 > L) begin : g_clamp
    assign tfd_clamped = (tfd > TW'(L)) ? TW'(L) : tfd;
  end else begin : g_no_clamp
    assign tfd_clamped = tfd;
  end
  assign code        = start ? tfd_clamped : tfd_q;
  assign step        = start ? '0 : cnt;

  assign step_valid = ~ext_reset & (start | (running & en));
  assign first      = start;
  assign store      = step_valid && (step == last_step[code]);
  assign sel1       = lut[step].a1;
  assign sel2       = lut[step].a2;
  assign shl        = lut[step].dbl;
  assign busy       = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tfd_q   <= '0;
      cnt     <= '0;
      running <= 1'b0;
    end else if (ext_reset) begin
      cnt     <= '0;
      running <= 1'b0;
    end else begin
      if (start) tfd_q <= tfd_clamped;
      if (step_valid) begin
        if (store) begin
          cnt     <= '0;
          running <= 1'b0;
        end else begin
          cnt     <= step + SW'(1);
          running <= 1'b1;
        end
      end
    end
  end

  // A new evaluation may only start once the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) (start && !ext_reset) |-> !running)
    else $error("SM_START while the gateway is still busy");

endmodule
