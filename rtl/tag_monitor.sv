// tag_monitor: internal revolution tag, tag strobe and tag error.
// A 7-bit counter is started by the first external tag after reset and from
// then on runs freely modulo 128. When it reads 127 a flip-flop produces the
// internal tag itag one cycle later, i.e. exactly 128 clocks after the
// previous tag, in the same cycle as the next external tag should arrive.
// tagstb, the strobe used by the accumulator reset, is the OR of the external
// and the internal tag, so a missing tag is replaced by its image. Once the
// counter is running, any cycle in which the external and internal tags differ
// (a missing, early or late tag) sets the tag error latch tag_err; blank clears
// it. This follows the source (counter, AND, flip-flops, XOR, latch); the
// counter reloads only on the first tag after reset, as the source describes,
// and tagstb is combinational from tag and itag.
module tag_monitor
  import mhsdo_pkg::*;
(
  input  logic tclk,
  input  logic rst_n,
  input  logic tag,      // external tag, one cycle per revolution
  input  logic blank,    // synchronous clear of tag_err
  output logic itag,     // internal tag image (f/128)
  output logic tagstb,   // tag strobe: tag or itag
  output logic tag_err,  // tag error indicator
  output logic synced    // counter has been started by a tag
);
  localparam int unsigned CW = $clog2(TAG_DIV);
  logic [CW-1:0] cnt;

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      synced  <= 1'b0;
      itag    <= 1'b0;
      tag_err <= 1'b0;
    end else begin
      if (!synced && tag) begin
        cnt    <= CW'(1);
        synced <= 1'b1;
      end else if (synced) begin
        cnt <= cnt + CW'(1);
      end
      itag <= synced && (cnt == CW'(TAG_DIV - 1));
      if (blank)                      tag_err <= 1'b0;
      else if (synced && (tag ^ itag)) tag_err <= 1'b1;
    end

  assign tagstb = tag | itag;
endmodule
