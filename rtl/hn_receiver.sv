// hn_receiver: harmonic number input of the DDS.
// The harmonic number h arrives as a train of 16 return-to-zero pulses, MSB
// first (6 integer bits, then 10 fraction bits). A short pulse is a 0, a long
// pulse a 1. The board delays the train (sdata) by 90 ns to make sddly; each
// rising edge of sddly clocks a 16-bit shift register with the level of sdata,
// which at that instant is still high only for a long pulse, so the word
// extracts itself without any clock of its own. A 5-bit counter on the same
// edges counts the pulses; it is held clear while the external time-out pulse
// sdto (started by the first pulse of a train) is low, and by rst_n.
// When the count reaches 16 the event is passed to the TCLK domain through a
// two-flop synchroniser and the shift register is copied into the harmonic
// number register h (h_load pulses for one cycle). When sdto ends, a pulse
// count other than 16 sets the h error latch h_err, which blank clears.
// All of this follows the source; the synchronisers, the use of count = 16 as
// "end of the last pulse", and the sampling of the count at the end of sdto in
// the TCLK domain are this design's choices. A train with the wrong count is
// still loaded if it reached 16 pulses; one that never does is not loaded.
// Timing: h is valid three TCLK cycles after the 16th sddly edge.
module hn_receiver
  import mhsdo_pkg::*;
(
  input  logic           tclk,
  input  logic           rst_n,   // asynchronous reset, TCLK domain
  input  logic           sdata,   // pulse train (SDATA)
  input  logic           sddly,   // pulse train delayed by 90 ns (SDDLY)
  input  logic           sdto,    // time-out window, high while a train is expected (SDTO)
  input  logic           blank,   // synchronous clear of h_err
  output logic [H_W-1:0] h,       // harmonic number register
  output logic           h_load,  // one-cycle pulse: h has just been loaded
  output logic           h_err    // h error indicator
);
  // ---- pulse-train domain (clocked by sddly) ----
  logic [H_W-1:0] shreg;
  logic [4:0]     cnt;
  logic           cnt16;

  always_ff @(posedge sddly) shreg <= {shreg[H_W-2:0], sdata};

  logic cnt_clr_n;
  assign cnt_clr_n = sdto & rst_n;

  always_ff @(posedge sddly or negedge cnt_clr_n)
    if (!cnt_clr_n)         cnt <= '0;
    else if (cnt != 5'h1F)  cnt <= cnt + 5'd1;

  assign cnt16 = (cnt == 5'(HN_PULSES));

  // ---- TCLK domain ----
  logic [2:0] c16_sync, to_sync;
  logic       cnt_ok;

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      c16_sync <= '0;
      to_sync  <= '0;
    end else begin
      c16_sync <= {c16_sync[1:0], cnt16};
      to_sync  <= {to_sync[1:0], sdto};
    end

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      h      <= '0;
      h_load <= 1'b0;
      cnt_ok <= 1'b0;
      h_err  <= 1'b0;
    end else begin
      h_load <= 1'b0;
      if (c16_sync[1] && !c16_sync[2]) begin
        h      <= shreg;
        h_load <= 1'b1;
      end
      if (to_sync[1]) cnt_ok <= c16_sync[1];
      if (blank)                              h_err <= 1'b0;
      else if (to_sync[2] && !to_sync[1] && !cnt_ok) h_err <= 1'b1;
    end
endmodule
