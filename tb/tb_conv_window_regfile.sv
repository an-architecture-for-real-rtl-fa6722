// tb_conv_window_regfile: shifts a random element stream (with idle gaps)
// into a window register file with L=2 and checks every register against the
// stream: register (r,c) must hold the element that entered r*Nf + c shifts
// ago, where Nf = fd + 2L + 1 is the frame width.  Two frame widths are run,
// the largest (N=12) and a smaller one set by fd after a clear.
module tb_conv_window_regfile;
  localparam int W = 8, N = 12, L = 2, WS = 2 * L + 1, NW = WS * WS, FL = N - WS;
  localparam int LW = $clog2(FL + 1);
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [LW-1:0] fd;
  logic signed [W-1:0] din;
  logic signed [W-1:0] win [NW];
  int checks = 0, failures = 0;

  conv_window_regfile #(.W(W), .N(N), .L(L)) dut (.clk, .rst_n, .clear, .shift, .fd, .din, .win);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nfs [2] = '{12, 8};
    logic signed [W-1:0] hist [$];
    fd = LW'(FL); din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (nfs[k]) begin
      @(negedge clk); clear = 1; fd = LW'(nfs[k] - WS);
      @(negedge clk); clear = 0;
      hist.delete();
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        shift = ($urandom_range(0, 3) != 0);
        din = W'($urandom);
        if (shift) hist.push_back(din);
        @(negedge clk);
        shift = 0;
        for (int r = 0; r < WS; r++)
          for (int c = 0; c < WS; c++) begin
            int d;
            d = r * nfs[k] + c;
            if (hist.size() > d) begin
              checks++;
              if (win[r*WS + c] !== hist[hist.size() - 1 - d]) begin
                failures++;
                $display("FAIL Nf %0d reg (%0d,%0d): got %0d expected %0d", nfs[k], r, c,
                         win[r*WS + c], hist[hist.size() - 1 - d]);
              end
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
