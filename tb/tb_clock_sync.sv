// tb_clock_sync: drives the STFT strobe with random high/low times (at least
// one clock each), changing the data word with every rising strobe edge, and
// checks that each rising edge gives exactly one shift pulse, three clock
// edges after the strobe is first sampled high, carrying that edge's word.
module tb_clock_sync;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  logic strobe = 0;
  logic [DW-1:0] data = '0;
  logic shift_en;
  logic [DW-1:0] sample;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [DW-1:0] sent [$];
  int            sent_cyc [$];
  int            n_pulses = 0;

  clock_sync #(.DW(DW)) dut (.clk, .rst_n, .stft_in_clk(strobe), .stft_in(data), .shift_en, .sample);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: compare each pulse with the oldest outstanding strobe
  always @(posedge clk) if (rst_n && shift_en) begin
    n_pulses++;
    checks++;
    if (sent.size() == 0) begin
      failures++; $display("FAIL pulse without strobe at %0d", cyc);
    end else begin
      logic [DW-1:0] d; int c;
      d = sent.pop_front(); c = sent_cyc.pop_front();
      if (sample !== d) begin failures++; $display("FAIL sample %h expected %h", sample, d); end
      checks++;
      // strobe raised after edge c, sampled at edge c+1, pulse visible after edge c+3
      if (cyc != c + 3) begin failures++; $display("FAIL latency %0d", cyc - c); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      data = DW'($urandom);
      strobe = 1;
      sent.push_back(data); sent_cyc.push_back(cyc);
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #1 strobe = 0;
      data = DW'($urandom);     // word may change once the strobe edge is taken
      repeat ($urandom_range(1, 5) - 1) @(posedge clk);
    end
    repeat (8) @(posedge clk);
    checks++;
    if (n_pulses != 300 || sent.size() != 0) begin
      failures++; $display("FAIL pulses %0d of 300", n_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
