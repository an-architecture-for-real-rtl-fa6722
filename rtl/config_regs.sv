// config_regs: the five configuration registers of the 2-D SM system.
//
// They hold the frame and window parameters that the control logic works
// from, all counted in window sliding steps:
//   FD  = N-(2L+1)        FIFO delay between window rows
//   SC  = 2LN+(2L+1)-1    step at which the first window is full
//   WS  = 2L+1            window size
//   DB  = (N-2L)*N        steps after SC at which the window reaches the
//                         bottom of the frame
//   EOF = N*N-1           last window position of a frame
// The register set, its three-signal write port (data, address, enable) and
// the formulas come from the design; the reset values (the formulas evaluated
// for the parameters N and L), the address order (as the registers are
// stacked: FD, SC, WS, DB, EOF) and the lack of a read port are this design's
// choices.
//
// Interface: a register is written on the rising clock edge when cfg_en is
// high; cfg_addr selects it (see sm2d_pkg::cfg_addr_e).  Writes to addresses
// 5..7 are ignored.  All five values are always visible on the outputs.
module config_regs
  import sm2d_pkg::*;
#(
  parameter int N  = 64,               // frame size N x N
  parameter int L  = 1,                // window half-width
  parameter int CW = $clog2(N * N + 1) // register width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] cfg_din,
  input  logic [2:0]    cfg_addr,
  input  logic          cfg_en,
  output logic [CW-1:0] fd,
  output logic [CW-1:0] sc,
  output logic [CW-1:0] ws,
  output logic [CW-1:0] db,
  output logic [CW-1:0] eof
);

  localparam logic [CW-1:0] FD_RST  = CW'(N - (2 * L + 1));
  localparam logic [CW-1:0] SC_RST  = CW'(2 * L * N + (2 * L + 1) - 1);
  localparam logic [CW-1:0] WS_RST  = CW'(2 * L + 1);
  localparam logic [CW-1:0] DB_RST  = CW'((N - 2 * L) * N);
  localparam logic [CW-1:0] EOF_RST = CW'(N * N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd  <= FD_RST;
      sc  <= SC_RST;
      ws  <= WS_RST;
      db  <= DB_RST;
      eof <= EOF_RST;
    end else if (cfg_en) begin
      case (cfg_addr_e'(cfg_addr))
        CFG_FD:  fd  <= cfg_din;
        CFG_SC:  sc  <= cfg_din;
        CFG_WS:  ws  <= cfg_din;
        CFG_DB:  db  <= cfg_din;
        CFG_EOF: eof <= cfg_din;
        default: ;
      endcase
    end
  end

endmodule
