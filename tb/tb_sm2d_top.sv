// tb_sm2d_top: end-to-end test of the 2-D S-method system at its default
// size (W=8, N=64, L=1).
//
// Phase A streams two full 64x64 frames of random complex STFT elements,
// the first evaluated as the S-method with L=1, the second as the
// spectrogram (L=0), followed by the elements that complete the last window
// positions.  Phase B clears the system, reprograms the configuration
// registers for 16x16 frames over the register bus and streams two more
// frames (spectrogram, then L=1).  Elements are sent at the highest rate the
// design allows (strobe period cn(L) clocks, at least 2) with occasional
// slower periods.
//
// Between the phases a partial frame is streamed and `clear` is raised in
// the middle of a window evaluation: no result may follow it.
//
// Every result is compared with an independent reference: for window
// position s of frame f the centre cell is (s/Nf + L, s mod Nf + L) and
//   SM_R = sum_{i1,i2=-l..l} Re(X(c+i)) * Re(X(c-i)),  likewise SM_I,
// with cells outside the frame read as zero; SM = SM_R + SM_I.  The latency
// from the strobe edge to the result (cn(l)+5 clocks), the end-of-frame
// marker and the number of results are checked too.  Each mechanism
// (left border, down border, end of frame, change of distribution,
// reconfiguration, full-rate streaming) is counted and must occur.
module tb_sm2d_top;
  import sm2d_pkg::*;
  localparam int W = 8, N = 64, L = 1;
  localparam int CW = $clog2(N * N + 1), TW = 1;
  localparam int AccW = 2 * W + $clog2(2 * (2 * L * L + 2 * L + 1)) + 1;

  logic clk = 0, rst_n = 0, clear = 0;
  logic stft_in_clk = 0;
  logic signed [W-1:0] stft_in_re = 0, stft_in_im = 0;
  logic [CW-1:0] cfg_din = 0;
  logic [2:0] cfg_addr = 0;
  logic cfg_en = 0;
  logic [TW-1:0] tfd = 0;
  logic signed [AccW:0] sm_out;
  logic signed [AccW-1:0] sm_re, sm_im;
  logic sm_valid, sm_eof;

  sm2d_top dut (.clk, .rst_n, .clear, .stft_in_clk, .stft_in_re, .stft_in_im, .cfg_din,
    .cfg_addr, .cfg_en, .tfd, .sm_out, .sm_re, .sm_im, .sm_valid, .sm_eof);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- the stream
  int nf, sc_now;
  int frame_l [$];      // distribution (Lsel) per frame
  int s_re [$], s_im [$], s_cyc [$];
  int n_out;

  // mechanism counters
  int n_left = 0, n_down = 0, n_eof = 0, n_switch = 0, n_reconf = 0, n_fullrate = 0;
  int n_spec = 0, n_sm = 0, n_abort = 0;
  bit junk = 0;
  int n_junk = 0;

  function automatic longint xv(input int f, input int r, input int c, input bit im);
    int idx;
    if (r >= nf || c >= nf) return 0;
    idx = f * nf * nf + r * nf + c;
    return im ? longint'(s_im[idx]) : longint'(s_re[idx]);
  endfunction

  always @(posedge clk) if (rst_n && sm_valid && junk) n_junk++;

  always @(posedge clk) if (rst_n && sm_valid && !junk) begin
    int f, s, l, cr, cc, elem;
    longint er, ei;
    f = n_out / (nf * nf);
    s = n_out % (nf * nf);
    if (f >= frame_l.size()) begin
      checks++; failures++;
      $display("FAIL unexpected result %0d", n_out);
    end else begin
      l  = frame_l[f];
      cr = s / nf + L;
      cc = s % nf + L;
      er = 0; ei = 0;
      for (int i1 = -l; i1 <= l; i1++)
        for (int i2 = -l; i2 <= l; i2++) begin
          er += xv(f, cr + i1, cc + i2, 0) * xv(f, cr - i1, cc - i2, 0);
          ei += xv(f, cr + i1, cc + i2, 1) * xv(f, cr - i1, cc - i2, 1);
        end
      checks++;
      if (sm_re !== AccW'(er) || sm_im !== AccW'(ei) || sm_out !== (AccW + 1)'(er + ei)) begin
        failures++;
        if (failures < 20)
          $display("FAIL frame %0d s %0d l %0d: got %0d+%0d=%0d expected %0d+%0d", f, s, l,
                   sm_re, sm_im, sm_out, er, ei);
      end
      checks++;
      if (sm_eof !== (s == nf * nf - 1)) begin
        failures++;
        $display("FAIL end-of-frame marker at s %0d", s);
      end
      // latency: element sc_now + n_out started this window position
      elem = sc_now + n_out;
      checks++;
      if (cyc != s_cyc[elem] + cn(l) + 5) begin
        failures++;
        if (failures < 20)
          $display("FAIL latency %0d, expected %0d", cyc - s_cyc[elem], cn(l) + 5);
      end
      if (s % nf + 2 * L >= nf && l > 0) n_left++;
      if (s / nf + 2 * L >= nf && l > 0) n_down++;
      if (sm_eof) n_eof++;
      if (l == 0) n_spec++; else n_sm++;
    end
    n_out++;
  end

  task automatic send_phase(input int nfr, input int nframes);
    int total, prev_l;
    total  = nframes * nfr * nfr + sc_now;
    prev_l = -1;
    for (int idx = 0; idx < total; idx++) begin
      int f, l, period;
      f = (idx < sc_now) ? 0 : (idx - sc_now) / (nfr * nfr);
      if (f >= nframes) f = nframes - 1;
      l = frame_l[f];
      // tfd is sampled when a window position starts, four clocks after its
      // strobe: let the windows in flight start before changing it
      if (prev_l >= 0 && l != prev_l) begin
        if (idx >= sc_now) n_switch++;
        repeat (6) @(posedge clk);
      end
      prev_l = l;
      period = (cn(l) < 2) ? 2 : cn(l);
      if ($urandom_range(0, 15) == 0) period += $urandom_range(1, 6);
      else if (idx >= sc_now && cn(l) >= 2) n_fullrate++;
      @(posedge clk); #1;
      s_re.push_back(int'($signed(W'($urandom))));
      s_im.push_back(int'($signed(W'($urandom))));
      if ($urandom_range(0, 40) == 0) begin s_re[idx] = -128; s_im[idx] = -128; end
      stft_in_re  = W'(s_re[idx]);
      stft_in_im  = W'(s_im[idx]);
      tfd         = TW'(l);
      stft_in_clk = 1;
      s_cyc.push_back(cyc);
      repeat (period / 2) @(posedge clk);
      #1 stft_in_clk = 0;
      repeat (period - period / 2 - 1) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != nframes * nfr * nfr) begin
      failures++;
      $display("FAIL %0d results, expected %0d", n_out, nframes * nfr * nfr);
    end
  endtask

  task automatic cfg_write(input cfg_addr_e a, input int v);
    @(negedge clk);
    cfg_addr = a; cfg_din = CW'(v); cfg_en = 1;
    @(negedge clk);
    cfg_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ------------------------------------------------ phase A: 64x64 frames
    nf = N; sc_now = 2 * L * N + 2 * L; n_out = 0;
    frame_l = '{1, 0};
    send_phase(N, 2);
    $display("phase A: %0d results", n_out);
    // ------------------- partial frame, abandoned in mid-evaluation by clear
    junk = 1;
    for (int idx = 0; idx < 2 * L * N + 2 * L + 20; idx++) begin
      @(posedge clk); #1;
      stft_in_re = W'($urandom); stft_in_im = W'($urandom); tfd = 1;
      stft_in_clk = 1;
      repeat (2) @(posedge clk);
      #1 stft_in_clk = 0;
      repeat (2) @(posedge clk);
    end
    // the last strobe's window starts 4 edges after its rise: clear during its steps
    repeat (2) @(posedge clk);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    n_junk = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (n_junk != 0) begin
      failures++;
      $display("FAIL %0d results after clear", n_junk);
    end
    n_abort++;
    junk = 0;
    // ------------------------------------- phase B: reprogram for 16x16
    cfg_write(CFG_FD, 16 - 3);
    cfg_write(CFG_SC, 2 * L * 16 + 2 * L);
    cfg_write(CFG_WS, 3);
    cfg_write(CFG_DB, (16 - 2 * L) * 16);
    cfg_write(CFG_EOF, 16 * 16 - 1);
    n_reconf++;
    nf = 16; sc_now = 2 * L * 16 + 2 * L; n_out = 0;
    s_re.delete(); s_im.delete(); s_cyc.delete();
    frame_l = '{0, 1};
    send_phase(16, 2);
    $display("phase B: %0d results", n_out);
    $display("mechanisms: left %0d down %0d eof %0d switch %0d reconf %0d fullrate %0d spec %0d sm %0d abort %0d",
             n_left, n_down, n_eof, n_switch, n_reconf, n_fullrate, n_spec, n_sm, n_abort);
    checks++;
    if (n_left == 0 || n_down == 0 || n_eof != 4 || n_switch < 2 || n_reconf == 0 ||
        n_fullrate == 0 || n_spec == 0 || n_sm == 0 || n_abort == 0) begin
      failures++;
      $display("FAIL a mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
