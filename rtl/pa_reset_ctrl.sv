// pa_reset_ctrl: phase accumulator reset on crossing an integer harmonic.
// When the harmonic number register holds an integer (its ten fraction bits
// are all zero) whose value differs from the last integer seen, a pending
// reset pend_rst is set and that integer is remembered. The pending reset waits
// for the next tag strobe; in that cycle it is cleared and parst, the reset of
// the phase accumulator, is registered high for one cycle. Thus the
// accumulator restarts from zero on the first tag after h reaches a new
// integer, which phase-locks any number of such sources fed with the same
// tagged clock. This follows the source (OR of the fraction bits, comparator
// with the previous integer, pending flip-flop, reset flip-flop). The
// remembered integer starts at 0 after reset (this design's choice), so the
// first non-zero integer h causes a reset. A new integer that appears in
// the same cycle as a tag strobe waits for the following strobe.
module pa_reset_ctrl
  import mhsdo_pkg::*;
(
  input  logic           tclk,
  input  logic           rst_n,
  input  logic [H_W-1:0] h,         // harmonic number register
  input  logic           tagstb,    // tag strobe
  output logic           pend_rst,  // reset pending
  output logic           parst      // phase accumulator reset, one cycle
);
  logic [HINT_W-1:0] last_int;
  logic              is_int, new_int;

  assign is_int  = ~|h[HFRAC_W-1:0];
  assign new_int = is_int && (h[H_W-1:HFRAC_W] != last_int);

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      last_int <= '0;
      pend_rst <= 1'b0;
      parst    <= 1'b0;
    end else begin
      if (new_int) last_int <= h[H_W-1:HFRAC_W];
      parst <= pend_rst && tagstb;
      if (new_int)     pend_rst <= 1'b1;
      else if (tagstb) pend_rst <= 1'b0;
    end
endmodule
