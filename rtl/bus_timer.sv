// bus_timer: MPM bus-cycle timeout of the system controller.
//
// Counts the cycles for which an address strobe stands on the backplane
// without an answer. When a cycle has lasted TIMEOUT_CYCLES clocks it ends it
// with a one-cycle bus error (BERR) pulse, so that a master that addressed a
// non-existent device is released after 1 us, well before the processor
// behind it would time out locally.
// Interface: as_i is the bus address strobe, ack_i any DTACK/BERR from a
// slave. berr_o pulses for one cycle after TIMEOUT_CYCLES cycles of as_i with
// no ack_i; the count restarts when as_i drops or a slave answers.
// The 1 us limit at a 16 MHz SYSCLK (16 cycles) is the system's figure; the
// cycle-exact counting rule is this design's.
module bus_timer #(
  parameter int unsigned TIMEOUT_CYCLES = 16   // 1 us at 16 MHz
) (
  input  logic clk,
  input  logic rst,
  input  logic as_i,
  input  logic ack_i,
  output logic berr_o
);
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic          fired;   // this cycle has already been ended

  always_ff @(posedge clk) begin
    if (rst || !as_i || ack_i) begin
      cnt    <= '0;
      fired  <= 1'b0;
      berr_o <= 1'b0;
    end else begin
      berr_o <= 1'b0;
      if (!fired) begin
        if (cnt == CW'(TIMEOUT_CYCLES - 1)) begin
          berr_o <= 1'b1;
          fired  <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
