// tclk_source: behavioural model of the is_tag clock (not synthesizable).
// Produces a clock of PERIOD_NS whose pulses are high for half a period,
// except every TAG_EVERY-th pulse, the tag, which is high for a quarter
// period. While skip_tag is high a tag pulse is sent as a normal pulse (a
// missing tag). tclk_dly is the clock delayed by 3/8 of a period, the
// sampling instant of the tag detector. is_tag is high from the rising edge
// of a tag pulse to the next rising edge, for reference; n counts pulses.
module tclk_source #(
  parameter realtime PERIOD_NS = 18.0,
  parameter int      TAG_EVERY = 128
) (
  input  logic skip_tag,
  output logic tclk,
  output logic tclk_dly,
  output logic is_tag,
  output int   n
);
  initial begin
    tclk = 1'b0;
    is_tag = 1'b0;
    n = 0;
    #(PERIOD_NS);
    forever begin
      is_tag = (n % TAG_EVERY == 0) && !skip_tag;
      tclk = 1'b1;
      #(is_tag ? PERIOD_NS / 4 : PERIOD_NS / 2);
      tclk = 1'b0;
      #(is_tag ? 3 * PERIOD_NS / 4 : PERIOD_NS / 2);
      n++;
    end
  end

  initial tclk_dly = 1'b0;
  always @(posedge tclk) fork
    begin
      #(3 * PERIOD_NS / 8) tclk_dly = 1'b1;
    end
  join_none
  always @(negedge tclk) fork
    begin
      #(3 * PERIOD_NS / 8) tclk_dly = 1'b0;
    end
  join_none
endmodule
