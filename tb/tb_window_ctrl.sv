// tb_window_ctrl: runs the window control over two frames plus the fill-up
// for two frame widths (8 and 6, L=1) and checks, after every shift, the
// start pulse, the window position, the end-of-frame pulse and the border
// flags.  The expected flags come from the window geometry: window column c
// holds frame column (s mod Nf) + 2L - c and window row r holds frame row
// s/Nf + 2L - r; a flag is set where that index is Nf or more.
module tb_window_ctrl;
  localparam int N = 8, L = 1, WS = 3, CW = $clog2(N * N + 1);
  logic clk = 0, rst_n = 0, clear = 0, shift_en = 0;
  logic [CW-1:0] fd, sc, ws, db, eof;
  logic sm_start, sm_clk_en, end_proc_frame, active;
  logic [WS-1:0] left_border, down_border;
  logic [CW-1:0] pos;
  int checks = 0, failures = 0;
  int n_left = 0, n_down = 0, n_eof = 0;

  window_ctrl #(.N(N), .L(L)) dut (.clk, .rst_n, .clear, .shift_en, .fd, .sc, .ws, .db, .eof,
    .sm_start, .sm_clk_en, .left_border, .down_border, .end_proc_frame, .active, .pos);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int nfs [2] = '{8, 6};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (nfs[k]) begin
      int nf, scv;
      nf  = nfs[k];
      scv = 2 * L * nf + 2 * L;
      @(negedge clk);
      clear = 1;
      fd = CW'(nf - WS); sc = CW'(scv); ws = CW'(WS); db = CW'((nf - 2 * L) * nf);
      eof = CW'(nf * nf - 1);
      @(negedge clk); clear = 0;
      for (int p = 0; p < scv + 2 * nf * nf; p++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          chk("no start while idle", int'(sm_start), 0);
        end
        shift_en = 1;
        @(negedge clk);
        shift_en = 0;
        if (p < scv) begin
          chk("no start before the window is full", int'(sm_start), 0);
          chk("clock enable off while filling", int'(sm_clk_en), 0);
        end else begin
          int s, tr, tc;
          logic [WS-1:0] el, ed;
          s  = (p - scv) % (nf * nf);
          tr = s / nf;
          tc = s % nf;
          for (int c = 0; c < WS; c++) el[c] = (tc + 2 * L - c >= nf);
          for (int r = 0; r < WS; r++) ed[r] = (tr + 2 * L - r >= nf);
          chk("start", int'(sm_start), 1);
          chk("clock enable", int'(sm_clk_en), 1);
          chk("position", int'(pos), s);
          chk("end of frame", int'(end_proc_frame), int'(s == nf * nf - 1));
          chk("left border", int'(left_border), int'(el));
          chk("down border", int'(down_border), int'(ed));
          if (left_border != 0) n_left++;
          if (down_border != 0) n_down++;
          if (end_proc_frame) n_eof++;
        end
      end
    end
    checks++;
    if (n_left == 0 || n_down == 0 || n_eof != 4) begin
      failures++;
      $display("FAIL coverage: left %0d down %0d eof %0d", n_left, n_down, n_eof);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
