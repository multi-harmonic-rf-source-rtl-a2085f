// phase_accumulator: the 17-bit DDS phase accumulator.
// Each TCLK cycle the accumulator adds the 16-bit harmonic number h, so the
// phase advances by h/2^17 of a turn per clock and the output frequency is
// f_RF = h * f_clock / 2^17 = (h/2^10) * f_rev with f_clock = 128 f_rev.
// parst (from the tag-synchronised reset logic) and accu_reset (the ACCU_RESET
// jumper, held as long as it is fitted) force the register to zero.
// Widths and behaviour follow the source; the reset priority is this design's.
// Timing: phase is registered; a reset in cycle n gives phase 0 in cycle n+1
// and h in cycle n+2.
module phase_accumulator
  import mhsdo_pkg::*;
(
  input  logic             tclk,
  input  logic             rst_n,
  input  logic [H_W-1:0]   h,
  input  logic             parst,       // tag-synchronised reset, one cycle
  input  logic             accu_reset,  // ACCU_RESET test jumper, level
  output logic [ACC_W-1:0] phase
);
  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n)                  phase <= '0;
    else if (parst || accu_reset) phase <= '0;
    else                         phase <= phase + ACC_W'(h);
endmodule
