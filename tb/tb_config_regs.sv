// tb_config_regs: checks the reset values of the five configuration registers
// against the formulas N-(2L+1), 2LN+2L, 2L+1, (N-2L)N and N*N-1 for N=64,
// L=1, then writes every address with random data and checks that exactly the
// addressed register changed, that a write with the enable low or to an
// unused address changes nothing.
module tb_config_regs;
  localparam int N = 64, L = 1, CW = $clog2(N * N + 1);
  logic clk = 0, rst_n = 0;
  logic [CW-1:0] din;
  logic [2:0]    addr;
  logic          en;
  logic [CW-1:0] fd, sc, ws, db, eof;
  int checks = 0, failures = 0;

  config_regs #(.N(N), .L(L)) dut (.clk, .rst_n, .cfg_din(din), .cfg_addr(addr), .cfg_en(en),
                                   .fd, .sc, .ws, .db, .eof);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [CW-1:0] got, input logic [CW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [CW-1:0] model [5];

  task automatic check_all();
    check("FD", fd, model[0]);
    check("SC", sc, model[1]);
    check("WS", ws, model[2]);
    check("DB", db, model[3]);
    check("EOF", eof, model[4]);
  endtask

  initial begin
    din = '0; addr = '0; en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model[0] = 61; model[1] = 130; model[2] = 3; model[3] = 3968; model[4] = 4095;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      din  = CW'($urandom);
      addr = 3'($urandom_range(0, 7));
      en   = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en && addr < 5) model[addr] = din;
      @(negedge clk);
      en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
