// hmult_sync: phase offset from delay, harmonic number and revolution
// frequency.
// The phase error a delay tau introduces at f_RF is f_RF * tau turns, with
// f_RF = h_int * f_rev. Two multipliers compute it:
//   rf    = h_int[5:0] * frev[17:0]          (24 bits, the "digital RF")
//   po    = (rf[23:6] * delay[13:0])[22:7]   (16 bits, one turn = 2^16)
// frev is the top 18 of the 23 revolution frequency bits of the frequency
// programme. Each rising edge of STROBE, after a two-flop synchroniser, gives
// three one-cycle pulses on consecutive clocks: sync1, sync2, sync3. The
// registers are loaded in the reverse order of the data flow so that the
// combinational multipliers always have a whole strobe period to settle:
//   sync1: po      <= bits of (rf_t * delay_r)
//   sync2: rf_t    <= rf[23:6], delay_r <= delay, arf <= rf[23:8]
//   sync3: frev_r  <= fprog[22:5], hint_r <= h[15:10]
// A new frequency or harmonic therefore reaches po on the third strobe
// counted from the one that carried it, a new delay on the second.
// STROBE edges must be at least three clocks apart, or the pulses overlap.
// The loading scheme, the widths (6 x 18, truncation to 18, 14-bit delay,
// 16-bit offset) and arf (the 16 MSBs of the 24-bit RF for the h*F REV
// test output) follow the source. The order of the sync pulses and the bit
// position of po in the product are this design's choices; with a frequency
// word whose LSB is 1e9/2^34 Hz (about 0.058 Hz, so that the PS range of about
// 478 kHz fills the 23 bits) and a delay in ns, po is exactly the phase offset
// in units of 2^-16 turn.
module hmult_sync
  import mhsdo_pkg::*;
(
  input  logic               tclk,
  input  logic               rst_n,
  input  logic               strobe,  // STROBE of the frequency programme (asynchronous)
  input  logic [FPROG_W-1:0] fprog,   // FPROG[22..0] revolution frequency
  input  logic [H_W-1:0]     h,       // harmonic number register
  input  logic [DLY_W-1:0]   delay,   // binary delay in ns (from d2b)
  output logic               sync1,
  output logic               sync2,
  output logic               sync3,
  output logic [PO_W-1:0]    po,      // phase offset, 2^16 = one turn
  output logic [15:0]        arf      // 16 MSBs of h_int * frev
);
  logic [2:0]             s_sync;
  logic [FREV_W-1:0]      frev_r;
  logic [HINT_W-1:0]      hint_r;
  logic [RFT_W-1:0]       rf_t;
  logic [DLY_W-1:0]       delay_r;
  logic [RF_W-1:0]        rf;
  logic [RFT_W+DLY_W-1:0] prod;

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      s_sync <= '0;
      sync1  <= 1'b0;
      sync2  <= 1'b0;
      sync3  <= 1'b0;
    end else begin
      s_sync <= {s_sync[1:0], strobe};
      sync1  <= s_sync[1] && !s_sync[2];
      sync2  <= sync1;
      sync3  <= sync2;
    end

  assign rf   = RF_W'(hint_r) * RF_W'(frev_r);
  assign prod = (RFT_W+DLY_W)'(rf_t) * (RFT_W+DLY_W)'(delay_r);

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      frev_r  <= '0;
      hint_r  <= '0;
      rf_t    <= '0;
      delay_r <= '0;
      arf     <= '0;
      po      <= '0;
    end else begin
      if (sync1) po <= prod[PO_LSB+PO_W-1:PO_LSB];
      if (sync2) begin
        rf_t    <= rf[RF_W-1:RF_W-RFT_W];
        delay_r <= delay;
        arf     <= rf[RF_W-1:RF_W-16];
      end
      if (sync3) begin
        frev_r <= fprog[FPROG_W-1:FPROG_W-FREV_W];
        hint_r <= h[H_W-1:HFRAC_W];
      end
    end
endmodule
