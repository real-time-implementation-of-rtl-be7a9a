// slot_timer: cell-slot sequencer.
//
// The switch moves one cell per cell slot of 13 clock cycles (520 ns at the
// 40 ns backplane clock). This counter walks through the sub-slots T0..T12
// and flags T0, which starts a slot. Both the i-out-of-m controller and the
// pacing measurement unit key their table accesses to this phase, so one
// timer drives both.
//
// Interface: phase is 0 in the first cycle after reset and advances every
// clock; slot_start is high while phase == 0.
//
// The 13-cycle, 520 ns slot and the naming T0..T12 follow the document; that
// the count starts at T0 when reset is released is this design's choice.
module slot_timer
  import shaper_pkg::*;
#(
  parameter int unsigned CYCLES = SLOT_CYCLES
) (
  input  logic   clk,
  input  logic   rst_n,
  output phase_t phase,
  output logic   slot_start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           phase <= '0;
    else if (phase == phase_t'(CYCLES-1)) phase <= '0;
    else                                  phase <= phase + 4'd1;
  end

  assign slot_start = (phase == '0);

endmodule
