// vax_mpm_slave: slave board of the VAX-to-MPM interface (in the MPM crate).
//
// Holds 32 register sets, one for each VAX process that may use the MPM at
// the same time. A set has four 32-bit registers, each seen by the VAX as an
// upper half (bits 31:16) and a lower half (bits 15:0):
//   status   read: lower half bit 0 = last MPM access of this set ended in a
//            bus error; upper half 0. Any write clears it.
//   address  the MPM byte address of the set's next access.
//   data     the MPM data latch. Reading the upper half reads the longword
//            at the address from the MPM into the latch and returns its
//            upper half; reading the lower half then returns the rest from
//            the latch. Writing the upper half only stores it; writing the
//            lower half stores it and writes the whole latch to the MPM.
//   autoinc  as data, and the address register steps by 4 after the MPM
//            access.
// The register number from the cable (VAX address bits 8:1) selects the set
// in bits 8:4, the register in bits 3:2 and the half in bit 1 (0 = upper).
// Interface: m2s/s2m is the cable (see vax_mpm_master); br/bg/req/rsp face
// the MPM backplane. Timing: register acknowledge one clock after AS; data
// acknowledge one clock after DS, or one clock after the MPM cycle for the
// two accesses that start one.
// The 32 sets, the four registers and their halves, the read of the upper
// data half starting the MPM read and the auto-increment follow the system's
// description. Which write half starts the MPM write, the status bits, the
// field positions of the register number and the step of 4 are this
// design's.
module vax_mpm_slave
  import mpm_pkg::*;
#(
  parameter int unsigned NSETS = 32
) (
  input  logic     clk,
  input  logic     sysreset,
  input  vax_m2s_t m2s,
  output vax_s2m_t s2m,
  output logic     br,
  input  logic     bg,
  output mpm_req_t req,
  input  mpm_rsp_t rsp
);
  localparam int unsigned SW = $clog2(NSETS);

  logic [31:0] addr_r [NSETS];
  logic [31:0] data_r [NSETS];
  logic        berr_r [NSETS];

  typedef enum logic [1:0] {R_IDLE, R_WAIT_DS, R_BUS, R_END} rstate_e;
  rstate_e      state;
  logic [7:0]   regnum;
  logic         wr;
  logic [SW-1:0] set;
  vax_reg_e     rsel;
  logic         lower;
  logic         start;
  logic [31:0]  bus_wdata;
  logic         done, busy, bus_berr;
  logic [31:0]  bus_rdata;
  logic         aack, dack;
  logic [15:0]  sad;

  assign set   = regnum[3 +: SW];
  assign rsel  = vax_reg_e'(regnum[2:1]);
  assign lower = regnum[0];

  mpm_bus_master u_bus (
    .clk, .rst(sysreset), .start, .write(wr), .addr(addr_r[set]),
    .wdata(bus_wdata), .done, .busy, .rdata(bus_rdata), .berr(bus_berr),
    .br, .bg, .req, .rsp
  );

  always_ff @(posedge clk) begin
    if (sysreset) begin
      state     <= R_IDLE;
      regnum    <= '0;
      wr        <= 1'b0;
      start     <= 1'b0;
      bus_wdata <= '0;
      aack      <= 1'b0;
      dack      <= 1'b0;
      sad       <= '0;
      for (int unsigned i = 0; i < NSETS; i++) begin
        addr_r[i] <= '0;
        data_r[i] <= '0;
        berr_r[i] <= 1'b0;
      end
    end else begin
      start <= 1'b0;
      unique case (state)
        R_IDLE: if (m2s.as) begin
          regnum <= m2s.ad[7:0];
          wr     <= m2s.write;
          aack   <= 1'b1;
          state  <= R_WAIT_DS;
        end
        R_WAIT_DS: if (m2s.ds) begin
          state <= R_END;
          dack  <= 1'b1;
          if (wr) begin
            unique case (rsel)
              VREG_STATUS: berr_r[set] <= 1'b0;
              VREG_ADDR: begin
                if (lower) addr_r[set][15:0]  <= m2s.ad;
                else       addr_r[set][31:16] <= m2s.ad;
              end
              default: begin                    // data, autoinc
                if (lower) begin
                  data_r[set][15:0] <= m2s.ad;
                  bus_wdata <= {data_r[set][31:16], m2s.ad};
                  start     <= 1'b1;
                  dack      <= 1'b0;
                  state     <= R_BUS;
                end else begin
                  data_r[set][31:16] <= m2s.ad;
                end
              end
            endcase
          end else begin
            unique case (rsel)
              VREG_STATUS: sad <= lower ? {15'd0, berr_r[set]} : 16'd0;
              VREG_ADDR:   sad <= lower ? addr_r[set][15:0] : addr_r[set][31:16];
              default: begin
                if (lower) sad <= data_r[set][15:0];
                else begin
                  start <= 1'b1;
                  dack  <= 1'b0;
                  state <= R_BUS;
                end
              end
            endcase
          end
        end
        R_BUS: if (done) begin
          berr_r[set] <= bus_berr;
          if (!wr) begin
            data_r[set] <= bus_rdata;
            sad         <= bus_rdata[31:16];
          end
          if (rsel == VREG_AUTOINC) addr_r[set] <= addr_r[set] + 32'd4;
          dack  <= 1'b1;
          state <= R_END;
        end
        R_END: if (!m2s.as) begin
          aack  <= 1'b0;
          dack  <= 1'b0;
          sad   <= '0;
          state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  assign s2m = '{aack: aack, dack: dack, ad: sad};

  // cable rule: the data acknowledge never comes without the register one
  a_dack_after_aack: assert property (@(posedge clk) disable iff (sysreset) dack |-> aack);
endmodule
