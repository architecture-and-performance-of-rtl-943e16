// mpm_memory: the MPM memory board, 4 Mbytes of DRAM with error correction.
//
// Stores 1M longwords, each as a 39-bit word: 32 data bits plus the seven
// check bits of a SECDED code (ecc_secded). Writes store the encoded word; a
// read decodes it, corrects a single-bit error in the returned data and
// reports a double-bit error. The board is a bus slave that answers a
// selected cycle after ACCESS_CYCLES clocks with DTACK, or with BERR when a
// read finds an uncorrectable word. Only longword transfers exist; address
// bits 1:0 are ignored, as are address bits above the 4 Mbyte window (the
// backplane decodes those).
// Interface: req/sel/rsp is the board's view of the MPM backplane.
// flip_mask is XORed into every code word as it is written: a diagnostic
// input used to show the correction working (zero in normal use).
// corrected / uncorrectable pulse for one cycle with the answer of a read
// that needed correction / could not be corrected.
// Timing: DTACK or BERR is on the bus ACCESS_CYCLES+2 clocks after AS rises
// (6 clocks, 375 ns, at the defaults); the board then waits for AS to drop
// before it takes the next cycle.
// Size, 32-bit transfers and SEC/multi-bit detection are the system's; the
// access time (250 ns), the code, the BERR on an uncorrectable read, no
// write-back of corrected words and no refresh model are this design's.
module mpm_memory
  import mpm_pkg::*;
#(
  parameter int unsigned BYTES         = MEM_BYTES,
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  mpm_req_t    req,
  input  logic        sel,
  output mpm_rsp_t    rsp,
  input  logic [38:0] flip_mask,
  output logic        corrected,
  output logic        uncorrectable
);
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned CW    = $clog2(ACCESS_CYCLES + 1);

  logic [38:0] mem [WORDS];

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_ACK, M_DONE} mstate_e;
  mstate_e       state;
  logic [CW-1:0] cnt;
  logic [38:0]   rd_code;
  logic [38:0]   wr_code;
  logic [31:0]   dec_data;
  logic          dec_single, dec_double;
  logic [AW-1:0] waddr;

  assign waddr = req.addr[AW+1:2];

  ecc_secded u_ecc (
    .enc_data(req.wdata), .enc_code(wr_code),
    .dec_code(rd_code), .dec_data, .dec_single, .dec_double
  );

  always_ff @(posedge clk) begin
    if (state == M_WAIT && cnt == '0) begin
      if (req.write) mem[waddr] <= wr_code ^ flip_mask;
      else           rd_code    <= mem[waddr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= M_IDLE;
      cnt           <= '0;
      rsp           <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      rsp.dtack     <= 1'b0;
      rsp.berr      <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
      unique case (state)
        M_IDLE: if (req.as && sel) begin
          state <= M_WAIT;
          cnt   <= CW'(ACCESS_CYCLES - 1);
        end
        M_WAIT: begin
          if (cnt == '0) state <= M_ACK;
          else           cnt   <= cnt - 1'b1;
        end
        M_ACK: begin
          state <= M_DONE;
          if (req.write) begin
            rsp.dtack <= 1'b1;
          end else begin
            rsp.rdata     <= dec_data;
            rsp.dtack     <= !dec_double;
            rsp.berr      <= dec_double;
            corrected     <= dec_single;
            uncorrectable <= dec_double;
          end
        end
        M_DONE: if (!req.as) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
