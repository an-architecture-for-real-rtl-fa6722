// tb_fifo_delay: writes a random word stream with random gaps into the delay
// line at several lengths (after a clear each) and checks that the word seen
// at every write is the one written `len` writes before.
module tb_fifo_delay;
  localparam int W = 8, DEPTH = 13, LW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0, clear = 0, write = 0;
  logic [LW-1:0] len;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  fifo_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .write, .len, .din, .dout);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [4] = '{13, 1, 7, 12};
    logic [W-1:0] hist [$];
    len = 13; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (lens[k]) begin
      @(negedge clk); clear = 1; len = LW'(lens[k]);
      @(negedge clk); clear = 0;
      hist.delete();
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        write = ($urandom_range(0, 2) != 0);
        din = W'($urandom);
        if (write) begin
          if (hist.size() >= lens[k]) begin
            checks++;
            if (dout !== hist[hist.size() - lens[k]]) begin
              failures++;
              $display("FAIL len %0d write %0d: got %h expected %h", lens[k], i, dout,
                       hist[hist.size() - lens[k]]);
            end
          end
          hist.push_back(din);
        end
      end
      @(negedge clk) write = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
