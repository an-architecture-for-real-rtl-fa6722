// tb_sm_gateway: gives an L=2 gateway random windows (full signed 8-bit
// range, extreme values included), random border flags and random
// distribution codes, and compares each result with the S-method written as
// the full symmetric double sum
//   sum_{i1,i2 = -l..l} X(k1+i1,k2+i2) * X(k1-i1,k2-i2)
// (no halving, no doubling), padded cells read as zero.  It also checks the
// latency, cn(l) clocks from SM_START to the result with the enable held
// high, and cn(l) plus the paused clocks when the enable is dropped.  Every
// fifth trial is first started and abandoned with EXT_RESET after one or two
// steps: no result may appear and the gateway must be idle again.
module tb_sm_gateway;
  localparam int W = 8, L = 2, WS = 2 * L + 1, NW = WS * WS, TW = 2;
  localparam int MAXS = 2 * L * L + 2 * L + 1;
  localparam int AccW = 2 * W + $clog2(2 * MAXS) + 1;
  logic clk = 0, rst_n = 0, sm_start = 0, sm_clk_en = 0, ext_reset = 0;
  logic [TW-1:0] tfd;
  logic signed [W-1:0] win [NW];
  logic [WS-1:0] left_border, down_border;
  logic signed [AccW-1:0] sm_out;
  logic sm_valid, busy;
  int checks = 0, failures = 0;
  int n_paused = 0, n_padded = 0, n_abort = 0;

  sm_gateway #(.W(W), .L(L), .TW(TW)) dut (.clk, .rst_n, .ext_reset, .sm_start, .sm_clk_en, .tfd, .win,
    .left_border, .down_border, .sm_out, .sm_valid, .busy);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint xval(input int a, input int b);
    int r, c;
    r = L - a; c = L - b;
    if (left_border[c] || down_border[r]) return 0;
    return longint'(win[r*WS + c]);
  endfunction

  initial begin
    tfd = 0; left_border = 0; down_border = 0;
    foreach (win[i]) win[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int code, l, cycles, pauses;
      longint exp;
      bit pause;
      code = $urandom_range(0, 3);
      l = (code > L) ? L : code;
      foreach (win[i]) begin
        case ($urandom_range(0, 5))
          0: win[i] = -128;
          1: win[i] = 127;
          default: win[i] = W'($urandom);
        endcase
      end
      left_border = ($urandom_range(0, 2) == 0) ? WS'($urandom) : '0;
      down_border = ($urandom_range(0, 2) == 0) ? WS'($urandom) : '0;
      if (left_border != 0 || down_border != 0) n_padded++;
      exp = 0;
      for (int i1 = -l; i1 <= l; i1++)
        for (int i2 = -l; i2 <= l; i2++)
          exp += xval(i1, i2) * xval(-i1, -i2);
      pause = (t % 3 == 2);
      if (t % 5 == 4) begin
        bit seen;
        @(negedge clk);
        tfd = 2'd2; sm_start = 1; sm_clk_en = 1;
        @(negedge clk);
        sm_start = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
        ext_reset = 1;
        @(negedge clk);
        ext_reset = 0;
        seen = 0;
        repeat (16) begin
          @(negedge clk);
          if (sm_valid) seen = 1;
        end
        checks++;
        if (seen || busy) begin
          failures++;
          $display("FAIL trial %0d: result or busy after EXT_RESET", t);
        end
        n_abort++;
      end
      @(negedge clk);
      tfd = TW'(code); sm_start = 1; sm_clk_en = 1;
      cycles = 0; pauses = 0;
      do begin
        @(posedge clk);
        cycles++;
        @(negedge clk);
        sm_start = 0;
        sm_clk_en = pause ? ($urandom_range(0, 1) == 1) : 1'b1;
        tfd = TW'($urandom);
        if (!sm_clk_en && !sm_valid) pauses++;
      end while (!sm_valid && cycles < 100);
      if (pauses > 0) n_paused++;
      checks++;
      if (sm_out !== AccW'(exp)) begin
        failures++;
        $display("FAIL trial %0d l=%0d: got %0d expected %0d", t, l, sm_out, exp);
      end
      checks++;
      if (cycles != 2 * l * l + 2 * l + 1 + pauses) begin
        failures++;
        $display("FAIL trial %0d l=%0d: %0d cycles, expected %0d", t, l, cycles,
                 2 * l * l + 2 * l + 1 + pauses);
      end
      sm_clk_en = 1;
    end
    checks++;
    if (n_paused == 0 || n_padded == 0 || n_abort == 0) begin
      failures++;
      $display("FAIL coverage paused %0d padded %0d abort %0d", n_paused, n_padded, n_abort);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
