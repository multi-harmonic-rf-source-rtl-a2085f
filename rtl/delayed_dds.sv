// delayed_dds: direct digital synthesiser with delay-compensated sine and
// cosine outputs, the logic of the multi-harmonic RF source with delayed
// outputs.
// The clock TCLK runs at 128 x f_rev and carries a revolution tag as a short
// clock pulse. A 17-bit phase accumulator adds the 16-bit harmonic number h
// (6 integer, 10 fraction bits) every clock, so f_RF = h/2^10 * f_rev. When h
// reaches a new integer value the accumulator is reset on the next tag, which
// aligns the phase of every source driven by the same tagged clock. To the
// accumulator a phase offset equal to f_RF times a front-panel delay
// (0..9999 ns) is added or subtracted, so that the outputs lead or lag by that
// delay; the sum addresses a sine/cosine ROM that drives two 12-bit DACs.
// Blocks: hn_receiver (serial h input, h error), tag_detect and tag_monitor
// (tag recovery, internal f/128 tag, tag error), pa_reset_ctrl and
// phase_accumulator, d2b and hmult_sync (phase offset), phase_offset_adder
// and sincos_rom (output words), hnm_gen (test pulse train). Test words ahn,
// phi_off and arf feed the analogue monitor DACs; pa_bus is the accumulator
// as brought to the test connector.
// The structure follows the source. An explicit power-on reset rst_n, the
// two-flop synchronisers on blank, sgn and accu_rs, and the offset-binary
// coding of phi_off by inverting the MSB of the signed offset are this
// design's choices. The board-level parts (ECL receiver, opto-couplers, the
// 90 ns delay line, the 4.5 us timer, the clock delay used for tag sampling,
// DACs and filters) are outside this module.
// Timing: sin/cos follow the accumulator by three clocks (offset adder, ROM
// magnitude, output register).
module delayed_dds
  import mhsdo_pkg::*;
(
  input  logic               tclk,       // TCLK, 128 x f_rev with tags
  input  logic               tclk_dly,   // TCLK delayed 0.25..0.5 period
  input  logic               rst_n,      // power-on reset
  // harmonic number input
  input  logic               sdata,      // SDATA pulse train
  input  logic               sddly,      // SDATA delayed by 90 ns
  input  logic               sdto,       // time-out window from the timer
  // revolution frequency programme
  input  logic [FPROG_W-1:0] fprog,      // FPROG[22..0]
  input  logic               strobe,     // STROBE
  // front panel and control
  input  logic [15:0]        delay_bcd,  // DELAY[15..0], four BCD digits, ns
  input  logic               dly_sub,    // +/- DELAY switch: 1 subtracts
  input  logic               blank,      // BLANK: clear error indicators
  input  logic               sgn,        // SGN: invert the outputs
  input  logic [H_W-1:0]     hnm,        // HNM[15..0] test switches SW2/SW1
  input  logic               accu_rs,    // ACCU_RESET jumper ST7
  input  logic               hn_enbl,    // HN_ENABLE jumper ST6
  input  logic               hn_var,     // HN_VAR jumper ST5
  // outputs
  output logic [DAC_W-1:0]   sin_o,      // SIN[11..0], offset binary
  output logic [DAC_W-1:0]   cos_o,      // COS[11..0], offset binary
  output logic [11:0]        ahn,        // 12 MSBs of h
  output logic [11:0]        phi_off,    // 12 MSBs of the signed offset, offset binary
  output logic [15:0]        arf,        // 16 MSBs of h_int x f_rev
  output logic               pa_reset,   // parst, to the PA_RESET output
  output logic               h_err,      // h ERROR LED
  output logic               tag_err,    // TAG ERROR LED
  output logic [ACC_W-1:0]   pa_bus,     // accumulator on the test connector
  output logic               sdout,      // SDOUT test pulse train
  output logic               lf_out      // low-frequency edge source
);
  logic [1:0] blank_s, sgn_s, accu_s;   // two-flop synchronisers

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      blank_s <= '0; sgn_s <= '0; accu_s <= '0;
    end else begin
      blank_s <= {blank_s[0], blank};
      sgn_s   <= {sgn_s[0], sgn};
      accu_s  <= {accu_s[0], accu_rs};
    end

  logic [H_W-1:0]    h;
  logic              h_load;
  logic              tag, itag, tagstb, synced, pend_rst, parst;
  logic [ACC_W-1:0]  phase;
  logic [DLY_W-1:0]  delay_bin;
  logic              sync1, sync2, sync3, hnm_busy;
  logic [PO_W-1:0]   po, po_signed;
  logic [ADDR_W-1:0] addr;

  hn_receiver u_hn (
    .tclk, .rst_n, .sdata, .sddly, .sdto, .blank(blank_s[1]),
    .h, .h_load, .h_err);

  tag_detect u_tagd (.tclk, .tclk_dly, .rst_n, .tag);

  tag_monitor u_tagm (
    .tclk, .rst_n, .tag, .blank(blank_s[1]),
    .itag, .tagstb, .tag_err, .synced);

  pa_reset_ctrl u_rst (.tclk, .rst_n, .h, .tagstb, .pend_rst, .parst);

  phase_accumulator u_acc (
    .tclk, .rst_n, .h, .parst, .accu_reset(accu_s[1]), .phase);

  d2b u_d2b (.bcd(delay_bcd), .bin(delay_bin));

  hmult_sync u_mult (
    .tclk, .rst_n, .strobe, .fprog, .h, .delay(delay_bin),
    .sync1, .sync2, .sync3, .po, .arf);

  phase_offset_adder u_add (
    .tclk, .rst_n, .phase, .po, .sub(dly_sub), .addr);

  sincos_rom u_rom (.tclk, .rst_n, .addr, .sgn(sgn_s[1]), .sin_o, .cos_o);

  hnm_gen u_hnm (
    .tclk, .rst_n, .hnm, .hn_enbl, .hn_var, .sdout, .busy(hnm_busy), .lf_out);

  assign po_signed = dly_sub ? -po : po;
  assign phi_off   = {~po_signed[PO_W-1], po_signed[PO_W-2:PO_W-12]};
  assign ahn       = h[H_W-1:H_W-12];
  assign pa_reset  = parst;
  assign pa_bus    = phase;
endmodule
