// tag_detect: recovers the revolution tag carried on the clock.
// The 128 x f_rev clock has a high time of half a period, except once per
// revolution where the high time is a quarter period: that short pulse is the
// tag. The clock is sampled by a flip-flop clocked by tclk_dly, a copy of the
// clock delayed by more than a quarter and less than half a period: TCLK is
// still high there for a normal pulse and already low for the tag. The sample
// is retimed to the next TCLK rising edge, giving tag, a one-cycle pulse in the
// cycle that follows the tagged clock edge.
// The source states only that the tag is detected inside the logic and held in
// a flip-flop; the delayed-clock sampling and the placement of the delay
// element outside this module are this design's choices.
module tag_detect (
  input  logic tclk,      // tagged clock (TTL level)
  input  logic tclk_dly,  // tclk delayed by 0.25..0.5 of a period
  input  logic rst_n,
  output logic tag        // one TCLK cycle per tag
);
  logic short_pulse;

  always_ff @(posedge tclk_dly or negedge rst_n)
    if (!rst_n) short_pulse <= 1'b0;
    else        short_pulse <= ~tclk;

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) tag <= 1'b0;
    else        tag <= short_pulse;
endmodule
