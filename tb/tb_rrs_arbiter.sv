// tb_rrs_arbiter: self-checking test of the 16-request round-robin arbiter.
// Part A keeps all sixteen requests up: the grant must visit 0,1,...,15,0,...
// in order, moving one clock after each cycle end. Part B raises a random
// set of requests whose masters leave after one cycle: each must be served
// exactly once, in rising slot order after the last owner. Part C checks that
// a lone request on an idle bus is granted after one clock.
module tb_rrs_arbiter;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  logic [N-1:0] br, bg;
  logic cyc_end, busy;
  int checks = 0, failures = 0;

  rrs_arbiter #(.N(N)) dut (.clk, .rst, .br, .cyc_end, .bg, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t bg=%h br=%h)", what, $time, bg, br);
    end
  endtask

  function automatic int idx(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_i, last, cnt;
    logic [N-1:0] want, served;
    br = '0; cyc_end = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- A: everyone requesting all the time
    br = '1;
    @(negedge clk);
    check(bg == 16'h0001, "A first grant goes to slot 0");
    for (int k = 0; k < 40; k++) begin
      expect_i = k % N;
      check(idx(bg) == expect_i && $onehot(bg), $sformatf("A grant %0d to slot %0d", k, expect_i));
      @(negedge clk);                     // owner's cycle runs two clocks
      cyc_end = 1;
      @(negedge clk);
      cyc_end = 0;
      check(idx(bg) == (expect_i + 1) % N, "A grant moves one clock after cycle end");
    end
    last = idx(bg);
    // drain: drop everybody, end the current cycle
    br = '0;
    cyc_end = 1; @(negedge clk); cyc_end = 0;
    @(negedge clk);
    check(bg == '0 && !busy, "A bus idle after all requests go");
    // ---- B: random one-shot request sets
    for (int r = 0; r < 30; r++) begin
      want = N'($urandom) | N'(1 << ($urandom % N));
      br = want; served = '0; cnt = 0;
      last = last;                         // previous owner
      while (br != '0 && cnt < 64) begin
        @(negedge clk);
        cnt++;
        if (bg != '0) begin
          // expected: first requesting slot after 'last'
          expect_i = -1;
          for (int s = 1; s <= N && expect_i < 0; s++)
            if (br[(last + s) % N]) expect_i = (last + s) % N;
          check(idx(bg) == expect_i, $sformatf("B round %0d picks slot %0d", r, expect_i));
          check(!served[idx(bg)], "B no slot served twice");
          served[idx(bg)] = 1;
          last = idx(bg);
          cyc_end = 1;
          @(negedge clk);
          cyc_end = 0;
          br[last] = 0;                    // master leaves after its cycle
        end
      end
      check(served == want, $sformatf("B round %0d every requester served", r));
      @(negedge clk);
      last = last;
    end
    // ---- C: idle bus, one request
    @(negedge clk);
    br = 16'h0200;
    @(negedge clk);
    check(bg == 16'h0200, "C lone request granted after one clock");
    cyc_end = 1; br = 0; @(negedge clk); cyc_end = 0;
    @(negedge clk);
    check(bg == 0, "C released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
