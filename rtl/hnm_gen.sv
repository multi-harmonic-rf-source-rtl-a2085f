// hnm_gen: test harmonic number generator.
// Produces on sdout one harmonic number pulse train in the same format as the
// external source: 16 return-to-zero pulses, MSB first, a long pulse for a 1
// and a short one for a 0. A train starts on each rising edge of hn_enbl
// (synchronised to TCLK). With hn_var low the word sent is the switch setting
// hnm (SW2 and SW1, first pulse = hnm[15]); with hn_var high it is an integer
// harmonic that starts at 8, steps by one after each train up to 20 and then
// starts again at 8. lf_out is a free-running divided clock, a slow edge
// source that can be wired back to hn_enbl to step h continuously.
// What the generator does follows the source. The pulse timing is set by
// parameters in TCLK periods; the defaults (16-clock bit period, 4-clock zero,
// 8-clock one) reproduce 250 ns / 62.5 ns / 125 ns at a 64 MHz clock. The
// wrap from 20 back to 8 and the divider length are this design's choices.
// Timing: the first pulse starts three cycles after the hn_enbl edge; busy is
// high while a train is sent, and a trigger arriving then is ignored.
module hnm_gen
  import mhsdo_pkg::*;
#(
  parameter int unsigned BIT_CLKS  = 16,  // clocks per pulse period
  parameter int unsigned ZERO_CLKS = 4,   // high time of a 0
  parameter int unsigned ONE_CLKS  = 8,   // high time of a 1
  parameter int unsigned HVAR_MIN  = 8,
  parameter int unsigned HVAR_MAX  = 20,
  parameter int unsigned LF_DIV_W  = 22   // lf_out period = 2^LF_DIV_W clocks
) (
  input  logic           tclk,
  input  logic           rst_n,
  input  logic [H_W-1:0] hnm,      // HNM[15..0] from SW2/SW1
  input  logic           hn_enbl,  // HN_ENBL: a rising edge sends one train
  input  logic           hn_var,   // HN_VAR: send the stepping harmonic
  output logic           sdout,    // SDOUT pulse train
  output logic           busy,
  output logic           lf_out    // low-frequency edge source
);
  localparam int unsigned BCW = $clog2(BIT_CLKS);

  logic [2:0]          en_sync;
  logic [H_W-1:0]      word;
  logic [4:0]          bits_left;
  logic [BCW-1:0]      bclk;
  logic [HINT_W-1:0]   hvar;
  logic [LF_DIV_W-1:0] lf_cnt;

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      en_sync   <= '0;
      word      <= '0;
      bits_left <= '0;
      bclk      <= '0;
      busy      <= 1'b0;
      sdout     <= 1'b0;
      hvar      <= HINT_W'(HVAR_MIN);
      lf_cnt    <= '0;
    end else begin
      en_sync <= {en_sync[1:0], hn_enbl};
      lf_cnt  <= lf_cnt + LF_DIV_W'(1);
      if (!busy) begin
        sdout <= 1'b0;
        if (en_sync[1] && !en_sync[2]) begin
          busy      <= 1'b1;
          bits_left <= 5'(HN_PULSES);
          bclk      <= '0;
          word      <= hn_var ? {hvar, {HFRAC_W{1'b0}}} : hnm;
          if (hn_var)
            hvar <= (hvar >= HINT_W'(HVAR_MAX)) ? HINT_W'(HVAR_MIN) : hvar + HINT_W'(1);
        end
      end else begin
        sdout <= (bclk < (word[H_W-1] ? BCW'(ONE_CLKS) : BCW'(ZERO_CLKS)));
        if (bclk == BCW'(BIT_CLKS - 1)) begin
          bclk      <= '0;
          word      <= {word[H_W-2:0], 1'b0};
          bits_left <= bits_left - 5'd1;
          if (bits_left == 5'd1) busy <= 1'b0;
        end else begin
          bclk <= bclk + BCW'(1);
        end
      end
    end

  assign lf_out = lf_cnt[LF_DIV_W-1];
endmodule
