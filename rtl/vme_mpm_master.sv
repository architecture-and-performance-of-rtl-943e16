// vme_mpm_master: master board of the VME-to-MPM interface (in an XBP crate).
//
// Maps a window of the XBP's VMEbus addresses (0x300000 to 0xFFFFFF, 13
// Mbytes) onto the MPM and carries each longword access over the cable to
// the slave board in the MPM crate. The cable has one 32-bit multiplexed
// address/data path, turned round within a transfer, plus handshake lines.
// A transfer runs:
//   1. address phase: the master puts the MPM address (the XBP address minus
//      the window base) and the direction on the cable and raises AS;
//   2. on the slave's address acknowledge it takes the address off the cable;
//      for a write it puts the data on the cable, for a read it turns the
//      path round; either way it raises DS ("data here" / "send the data");
//   3. on the slave's data acknowledge (read data valid, or write finished)
//      it ends the XBP's cycle with DTACK (or BERR if the MPM cycle failed),
//      drops AS and DS and waits for both acknowledges to fall.
// Interface: cpu_* is a simplified local bus of the XBP (AS held until
// DTACK/BERR, which pulse for one cycle). Accesses outside the window are not
// answered by this board. xbp_reset carries the MPM SYSRESET into the XBP
// crate. m2s/s2m are the cable.
// Timing: the local cycle takes the cable handshake (about six clocks) plus
// the MPM bus cycle. The window, the multiplexed 32-bit path, longword-only
// transfers, the order of the handshake and the reset path follow the
// system's description; the subtraction of the window base, the four-phase
// signalling and the BERR path are this design's.
module vme_mpm_master
  import mpm_pkg::*;
#(
  parameter logic [31:0] WIN_LO = 32'h0030_0000,
  parameter logic [31:0] WIN_HI = 32'h00FF_FFFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cpu_as,
  input  logic        cpu_write,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic        cpu_dtack,
  output logic        cpu_berr,
  output logic [31:0] cpu_rdata,
  output logic        xbp_reset,
  output vme_m2s_t    m2s,
  input  vme_s2m_t    s2m
);
  typedef enum logic [1:0] {V_IDLE, V_ADDR, V_DATA, V_END} vstate_e;
  vstate_e state;
  logic    hit;
  logic    held;      // the answered XBP cycle has not ended yet

  assign hit       = cpu_as && (cpu_addr >= WIN_LO) && (cpu_addr <= WIN_HI);
  assign xbp_reset = s2m.reset;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= V_IDLE;
      m2s       <= '0;
      cpu_dtack <= 1'b0;
      cpu_berr  <= 1'b0;
      cpu_rdata <= '0;
      held      <= 1'b0;
    end else begin
      cpu_dtack <= 1'b0;
      cpu_berr  <= 1'b0;
      if (!cpu_as) held <= 1'b0;
      unique case (state)
        V_IDLE: if (hit && !held) begin
          m2s.ad    <= cpu_addr - WIN_LO;
          m2s.write <= cpu_write;
          m2s.as    <= 1'b1;
          state     <= V_ADDR;
        end
        V_ADDR: if (s2m.aack) begin
          m2s.ad <= m2s.write ? cpu_wdata : 32'd0;
          m2s.ds <= 1'b1;
          state  <= V_DATA;
        end
        V_DATA: if (s2m.dack) begin
          cpu_rdata <= s2m.ad;
          cpu_dtack <= !s2m.berr;
          cpu_berr  <= s2m.berr;
          held      <= 1'b1;
          m2s       <= '0;
          state     <= V_END;
        end
        V_END: if (!s2m.aack && !s2m.dack) state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end
endmodule
