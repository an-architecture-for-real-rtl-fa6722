// tb_sm_gateway_ctrl: for every distribution code of an L=2 control (codes 0,
// 1, 2 and an out-of-range 3) records the schedule the control produces and
// checks it against the S-method term set: cn(l) = 2l^2+2l+1 steps, step 0
// the undoubled centre term, every other step a doubled product of two cells
// at offsets +(i1,i2) and -(i1,i2), each such symmetric pair with
// max(|i1|,|i2|) <= l exactly once, store only on the last step.  Steps are
// also paused with the enable low.
module tb_sm_gateway_ctrl;
  localparam int L = 2, WS = 2 * L + 1, NW = WS * WS, AW = $clog2(NW), TW = 2;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  logic [TW-1:0] tfd;
  logic step_valid, first, store, shl, busy;
  logic [AW-1:0] sel1, sel2;
  int checks = 0, failures = 0;

  sm_gateway_ctrl #(.L(L), .TW(TW)) dut (.clk, .rst_n, .ext_reset(1'b0), .start, .en, .tfd, .step_valid, .first,
    .store, .sel1, .sel2, .shl, .busy);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // offset of the cell at a register address
  function automatic void offs(input int a, output int o1, output int o2);
    o1 = L - a / WS;
    o2 = L - a % WS;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int code = 0; code < 4; code++) begin
      int l, steps, seen [int];
      bit done;
      l = (code > L) ? L : code;
      seen.delete();
      @(negedge clk);
      tfd = TW'(code); start = 1; en = 1;
      steps = 0; done = 0;
      while (!done && steps < 40) begin
        #1;
        if (step_valid) begin
          int a1, b1, a2, b2, key;
          offs(int'(sel1), a1, b1);
          offs(int'(sel2), a2, b2);
          chk("first only on step 0", first == (steps == 0));
          if (steps == 0) begin
            chk("step 0 is the centre", a1 == 0 && b1 == 0 && a2 == 0 && b2 == 0 && !shl);
          end else begin
            chk("operands symmetric", a1 == -a2 && b1 == -b2 && !(a1 == 0 && b1 == 0));
            chk("off-centre doubled", shl);
            chk("inside window", (a1 <= l && a1 >= -l && b1 <= l && b1 >= -l));
            // one key per symmetric pair
            key = (a1 > 0 || (a1 == 0 && b1 > 0)) ? (a1 * 16 + b1) : (-a1 * 16 - b1);
            chk("pair used once", !seen.exists(key));
            seen[key] = 1;
          end
          chk("store only on the last step", store == (steps == 2 * l * l + 2 * l));
          if (store) done = 1;
          steps++;
        end
        @(negedge clk);
        start = 0;
        // pause now and then
        en = ($urandom_range(0, 3) != 0);
        tfd = TW'($urandom);   // changes after the start must not matter
      end
      chk("number of steps", steps == 2 * l * l + 2 * l + 1);
      chk("all pairs", seen.size() == 2 * l * l + 2 * l);
      chk("idle after last step", !busy);
      en = 1;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
