// reset_oneshot: VMEbus SYSRESET generator of the system controller.
//
// A one-shot that drives the system reset when power comes up and when the
// front-panel reset switch is pressed. While power_good is low or the switch
// is held the one-shot is kept triggered; after both are released SYSRESET
// stays active for PULSE_CYCLES more clocks, then drops.
// Interface: power_good (high once the supply is stable), reset_sw (high
// while pressed, synchronised here with two flip-flops), sysreset (active
// high, registered).
// sysreset is declared with an initial value of 1, so the reset is active
// from power-up before the first clock edge.
// Timing: sysreset rises within three clocks of a switch press or at once on
// loss of power, and falls PULSE_CYCLES clocks after the last trigger.
// That a one-shot makes the reset from power-up and the switch is the
// system's description. The pulse length is not given; the default of 200 ms
// at 16 MHz is the VMEbus minimum for SYSRESET.
module reset_oneshot #(
  parameter int unsigned PULSE_CYCLES = 3_200_000   // 200 ms at 16 MHz
) (
  input  logic clk,
  input  logic power_good,
  input  logic reset_sw,
  output logic sysreset = 1'b1   // active from the moment power is applied
);
  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic [1:0]    sw_sync;
  logic          trig;

  always_ff @(posedge clk) sw_sync <= {sw_sync[0], reset_sw};
  assign trig = !power_good || sw_sync[1];

  always_ff @(posedge clk) begin
    if (trig) begin
      cnt      <= CW'(PULSE_CYCLES);
      sysreset <= 1'b1;
    end else if (cnt != '0) begin
      cnt      <= cnt - 1'b1;
      sysreset <= 1'b1;
    end else begin
      sysreset <= 1'b0;
    end
  end
endmodule
