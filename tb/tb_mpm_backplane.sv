// tb_mpm_backplane: self-checking test of the backplane multiplexer and
// address decoder. For random masters' requests and random one-hot grants
// the bus must carry the owner's request; random addresses must select the
// memory (below 4 Mbyte), semaphores (4-8 Mbyte), FIFO board (256 bytes at
// 8 Mbyte) or nothing; answers must be merged and routed as expected.
module tb_mpm_backplane;
  import mpm_pkg::*;
  mpm_req_t mreq [16];
  logic [15:0] bg;
  mpm_req_t bus;
  logic mem_sel, sem_sel, fifo_sel, timer_berr, slave_ack;
  mpm_rsp_t mem_rsp, sem_rsp, fifo_rsp, rsp;
  int checks = 0, failures = 0;

  mpm_backplane #(.N(16)) dut (.mreq, .bg, .bus, .mem_sel, .sem_sel, .fifo_sel,
    .mem_rsp, .sem_rsp, .fifo_rsp, .timer_berr, .rsp, .slave_ack);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, region;
    logic [31:0] a;
    bit em, es, ef;
    for (int r = 0; r < 2000; r++) begin
      region = $urandom % 5;
      case (region)
        0: a = ($urandom % 2) ? 32'h3F_FF00 + $urandom % 32'h100 : $urandom % 32'h40_0000;
        1: a = 32'h40_0000 + $urandom % 32'h40_0000;
        2: a = 32'h80_0000 + $urandom % 32'h100;
        3: a = 32'h80_0100 + (($urandom % 2) ? $urandom % 32'h100 : $urandom % 32'h40_0000);
        default: a = $urandom | 32'h0100_0000;
      endcase
      a[1:0] = 0;
      foreach (mreq[i]) begin
        mreq[i].as = 1'($urandom); mreq[i].write = 1'($urandom);
        mreq[i].addr = $urandom; mreq[i].wdata = $urandom;
      end
      g = $urandom % 17;
      bg = (g == 16) ? '0 : 16'(1 << g);
      if (g < 16) mreq[g].addr = a;
      mem_rsp = '0; sem_rsp = '0; fifo_rsp = '0; timer_berr = 0;
      mem_rsp.rdata = $urandom; sem_rsp.rdata = $urandom; fifo_rsp.rdata = $urandom;
      case ($urandom % 4)
        0: mem_rsp.dtack = 1;
        1: sem_rsp.berr = 1;
        2: fifo_rsp.dtack = 1;
        default: timer_berr = 1;
      endcase
      #1;
      if (g == 16) begin
        check(bus == '0, "no grant, idle bus");
        continue;
      end
      check(bus == mreq[g], "owner's request on the bus");
      em = (region == 0); es = (region == 1); ef = (region == 2);
      check(mem_sel == em && sem_sel == es && ef == fifo_sel,
            $sformatf("decode %h -> %b%b%b", a, mem_sel, sem_sel, fifo_sel));
      check(rsp.dtack == (mem_rsp.dtack | fifo_rsp.dtack), "DTACK merge");
      check(rsp.berr == (sem_rsp.berr | timer_berr), "BERR merge");
      check(slave_ack == (mem_rsp.dtack | sem_rsp.berr | fifo_rsp.dtack), "slave answer seen by timer");
      check(rsp.rdata == (em ? mem_rsp.rdata : es ? sem_rsp.rdata : ef ? fifo_rsp.rdata : 32'd0),
            "read data from the selected board");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
