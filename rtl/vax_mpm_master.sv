// vax_mpm_master: master board of the VAX-to-MPM interface (in a VAX).
//
// Makes the interface an I/O device of 512 consecutive bytes on the VAX's
// 16-bit Unibus or Q-bus. Each 16-bit access to the device is passed over
// a cable with a 16-bit multiplexed address/data path to the slave board,
// which holds the 32 register sets. A transfer runs:
//   1. the master puts the register number (VAX address bits 8:1) and the
//      direction on the cable and raises AS;
//   2. on the slave's acknowledge it puts the write data on the cable, or
//      turns the path round for a read, and raises DS;
//   3. on the slave's data acknowledge it ends the VAX cycle, returning the
//      read data, and drops AS and DS, then waits for the acknowledges to
//      fall.
// Interface: vax_* is a simplified I/O bus (request held until the one-cycle
// ack); the device answers only addresses in the 512-byte block at DEV_BASE.
// m2s/s2m is the cable.
// Timing: a VAX access takes the cable handshake (about six clocks) plus,
// for the accesses that start one, an MPM bus cycle on the slave board.
// The 512-byte window, the 16-bit multiplexed cable, the register-number
// phase before the data phase come from the system's description; DEV_BASE
// (the I/O-page address 764000 octal), the use of address bits 8:1 and the
// four-phase signalling are this design's.
module vax_mpm_master
  import mpm_pkg::*;
#(
  parameter logic [17:0] DEV_BASE = 18'o764000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vax_req,
  input  logic        vax_write,
  input  logic [17:0] vax_addr,
  input  logic [15:0] vax_wdata,
  output logic        vax_ack,
  output logic [15:0] vax_rdata,
  output vax_m2s_t    m2s,
  input  vax_s2m_t    s2m
);
  typedef enum logic [1:0] {Q_IDLE, Q_REG, Q_DATA, Q_END} qstate_e;
  qstate_e state;
  logic    hit;
  logic    held;      // the answered request has not been dropped yet

  assign hit = vax_req && (vax_addr[17:9] == DEV_BASE[17:9]);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= Q_IDLE;
      m2s       <= '0;
      vax_ack   <= 1'b0;
      vax_rdata <= '0;
      held      <= 1'b0;
    end else begin
      vax_ack <= 1'b0;
      if (!vax_req) held <= 1'b0;
      unique case (state)
        Q_IDLE: if (hit && !held) begin
          m2s.ad    <= {8'd0, vax_addr[8:1]};
          m2s.write <= vax_write;
          m2s.as    <= 1'b1;
          state     <= Q_REG;
        end
        Q_REG: if (s2m.aack) begin
          m2s.ad <= m2s.write ? vax_wdata : 16'd0;
          m2s.ds <= 1'b1;
          state  <= Q_DATA;
        end
        Q_DATA: if (s2m.dack) begin
          vax_rdata <= s2m.ad;
          vax_ack   <= 1'b1;
          held      <= 1'b1;
          m2s       <= '0;
          state     <= Q_END;
        end
        Q_END: if (!s2m.aack && !s2m.dack) state <= Q_IDLE;
        default: state <= Q_IDLE;
      endcase
    end
  end
endmodule
