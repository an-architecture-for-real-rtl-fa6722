// sm2d_stream_check: streams NFRAMES random N x N frames of complex 2-D STFT
// elements into an sm2d_top of the given size at the full rate allowed for
// distribution code TFD (strobe period cn(TFD) clocks, at least 2) and
// checks every result against the S-method computed directly:
//   SM = sum_{i1,i2=-l..l} Re X(c+i) Re X(c-i) + Im X(c+i) Im X(c-i),
// cells outside the frame read as zero, c the window centre.  It also
// checks the throughput: the whole run must take NFRAMES*N*N*period clocks
// plus the window fill and a fixed latency.  Used by tb_sm2d_workloads.
module sm2d_stream_check
  import sm2d_pkg::*;
#(
  parameter int N       = 256,
  parameter int L       = 1,
  parameter int TFD     = 1,
  parameter int NFRAMES = 1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = 8;
  localparam int CW = $clog2(N * N + 1), TW = (L > 0) ? $clog2(L + 1) : 1;
  localparam int AccW = 2 * W + $clog2(2 * (2 * L * L + 2 * L + 1)) + 1;
  localparam int SC = 2 * L * N + 2 * L;
  localparam int PERIOD = (cn(TFD) < 2) ? 2 : cn(TFD);

  logic clk = 0, rst_n = 0;
  logic stft_in_clk = 0;
  logic signed [W-1:0] stft_in_re = 0, stft_in_im = 0;
  logic signed [AccW:0] sm_out;
  logic signed [AccW-1:0] sm_re, sm_im;
  logic sm_valid, sm_eof;

  sm2d_top #(.W(W), .N(N), .L(L)) dut (.clk, .rst_n, .clear(1'b0), .stft_in_clk, .stft_in_re,
    .stft_in_im, .cfg_din('0), .cfg_addr('0), .cfg_en(1'b0), .tfd(TW'(TFD)), .sm_out, .sm_re,
    .sm_im, .sm_valid, .sm_eof);

  always #5 clk = ~clk;

  int cyc = 0, n_out = 0, first_cyc = 0, last_cyc = 0, n_eof = 0;
  always @(posedge clk) cyc <= cyc + 1;

  byte s_re [], s_im [];

  function automatic longint xv(input int f, input int r, input int c, input bit im);
    int idx;
    if (r >= N || c >= N) return 0;
    idx = f * N * N + r * N + c;
    return im ? longint'(s_im[idx]) : longint'(s_re[idx]);
  endfunction

  always @(posedge clk) if (rst_n && sm_valid) begin
    int f, s, cr, cc;
    longint e;
    f = n_out / (N * N);
    s = n_out % (N * N);
    cr = s / N + L;
    cc = s % N + L;
    e = 0;
    for (int i1 = -TFD; i1 <= TFD; i1++)
      for (int i2 = -TFD; i2 <= TFD; i2++)
        e += xv(f, cr + i1, cc + i2, 0) * xv(f, cr - i1, cc - i2, 0)
           + xv(f, cr + i1, cc + i2, 1) * xv(f, cr - i1, cc - i2, 1);
    checks++;
    if (sm_out !== (AccW + 1)'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d L=%0d s %0d: got %0d expected %0d", N, L, s, sm_out, e);
    end
    if (sm_eof) n_eof++;
    if (n_out == 0) first_cyc = cyc;
    last_cyc = cyc;
    n_out++;
  end

  initial begin
    int total, start_cyc;
    done = 0; checks = 0; failures = 0;
    total = NFRAMES * N * N + SC;
    s_re = new[total];
    s_im = new[total];
    foreach (s_re[i]) begin
      s_re[i] = byte'($urandom);
      s_im[i] = byte'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start_cyc = cyc;
    for (int idx = 0; idx < total; idx++) begin
      @(posedge clk); #1;
      stft_in_re  = s_re[idx];
      stft_in_im  = s_im[idx];
      stft_in_clk = 1;
      repeat (PERIOD / 2) @(posedge clk);
      #1 stft_in_clk = 0;
      repeat (PERIOD - PERIOD / 2 - 1) @(posedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != NFRAMES * N * N || n_eof != NFRAMES) begin
      failures++;
      $display("FAIL N=%0d L=%0d: %0d results, %0d frame ends", N, L, n_out, n_eof);
    end
    // one result every PERIOD clocks once the window is full
    checks++;
    if (last_cyc - first_cyc != (NFRAMES * N * N - 1) * PERIOD) begin
      failures++;
      $display("FAIL N=%0d L=%0d: results spread over %0d clocks, expected %0d", N, L,
               last_cyc - first_cyc, (NFRAMES * N * N - 1) * PERIOD);
    end
    $display("N=%0d L=%0d Lsel=%0d: %0d results, one per %0d clocks", N, L, TFD, n_out, PERIOD);
    done = 1;
  end
endmodule
