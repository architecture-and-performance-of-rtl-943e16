// vme_mpm_slave: slave board of the VME-to-MPM interface (in the MPM crate).
//
// Takes an address from the cable into a latch and acknowledges it. On a
// read it asks for the MPM bus at once, reads the longword into a data latch
// and gives the bus back before the master even asks for the data, so the
// MPM bus cycle is as short as the MPM allows; it sends the latched data
// when the master raises DS. On a write it waits for the data on the cable,
// then asks for the bus, writes, gives the bus back and signals completion.
// The board is one of the MPM's bus masters (one BR/BG pair) and passes the
// MPM SYSRESET to the master board.
// Interface: m2s/s2m is the cable (see vme_mpm_master); br/bg/req/rsp face
// the MPM backplane; sysreset is the MPM reset, which also resets the board.
// Timing: address acknowledge one clock after AS; data acknowledge one clock
// after both DS and the end of the MPM cycle; acknowledges fall one clock
// after AS falls. The latch-and-release behaviour is the system's; the
// cable signalling and the BERR line are this design's.
module vme_mpm_slave
  import mpm_pkg::*;
(
  input  logic     clk,
  input  logic     sysreset,
  input  vme_m2s_t m2s,
  output vme_s2m_t s2m,
  output logic     br,
  input  logic     bg,
  output mpm_req_t req,
  input  mpm_rsp_t rsp
);
  typedef enum logic [2:0] {S_IDLE, S_RD_BUS, S_RD_HOLD, S_WR_WAIT, S_WR_BUS, S_END} sstate_e;
  sstate_e     state;
  logic [31:0] addr_lat;
  logic        start, wr;
  logic [31:0] wdata;
  logic        done, busy, bus_berr;
  logic [31:0] bus_rdata;
  logic        aack, dack, sberr;
  logic [31:0] sad;

  mpm_bus_master u_bus (
    .clk, .rst(sysreset), .start, .write(wr), .addr(addr_lat), .wdata,
    .done, .busy, .rdata(bus_rdata), .berr(bus_berr), .br, .bg, .req, .rsp
  );

  always_ff @(posedge clk) begin
    if (sysreset) begin
      state    <= S_IDLE;
      aack <= 1'b0;
      dack <= 1'b0;
      sberr <= 1'b0;
      sad   <= '0;
      addr_lat <= '0;
      wdata    <= '0;
      wr       <= 1'b0;
      start    <= 1'b0;
    end else begin
      start <= 1'b0;
      unique case (state)
        S_IDLE: if (m2s.as) begin
          addr_lat <= m2s.ad;
          wr       <= m2s.write;
          aack <= 1'b1;
          if (m2s.write) state <= S_WR_WAIT;
          else begin
            start <= 1'b1;               // request the MPM bus at once
            state <= S_RD_BUS;
          end
        end
        S_RD_BUS: if (done) state <= S_RD_HOLD;
        S_RD_HOLD: if (m2s.ds) begin
          sad   <= bus_rdata;
          sberr <= bus_berr;
          dack <= 1'b1;
          state    <= S_END;
        end
        S_WR_WAIT: if (m2s.ds) begin
          wdata <= m2s.ad;
          start <= 1'b1;
          state <= S_WR_BUS;
        end
        S_WR_BUS: if (done) begin
          sberr <= bus_berr;
          dack <= 1'b1;
          state    <= S_END;
        end
        S_END: if (!m2s.as) begin
          aack <= 1'b0;
          dack <= 1'b0;
          sberr <= 1'b0;
          sad   <= '0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign s2m = '{aack: aack, dack: dack, berr: sberr, reset: sysreset, ad: sad};

  // cable rule: the data acknowledge never comes without the address one
  a_dack_after_aack: assert property (@(posedge clk) disable iff (sysreset) dack |-> aack);
endmodule
