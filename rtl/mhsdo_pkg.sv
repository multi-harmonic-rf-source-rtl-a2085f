// mhsdo_pkg: widths and constants shared by the delayed-output multi-harmonic
// DDS. The numbers here are the source's own (17-bit accumulator, 16-bit
// harmonic number with 6 integer and 10 fraction bits, 14-bit ROM address,
// 12-bit DAC words, 128 clocks per revolution, 18 used bits of the revolution
// frequency, 14-bit binary delay, 16-bit phase offset) except PO_LSB, the
// position of the phase offset inside the delay product, which is this
// design's choice (see hmult_sync).
package mhsdo_pkg;
  localparam int unsigned ACC_W    = 17;  // phase accumulator width W
  localparam int unsigned H_W      = 16;  // harmonic number word
  localparam int unsigned HINT_W   = 6;   // integer part of h
  localparam int unsigned HFRAC_W  = 10;  // fraction part of h
  localparam int unsigned ADDR_W   = 14;  // sine/cosine ROM address
  localparam int unsigned DAC_W    = 12;  // SIN[11..0], COS[11..0]
  localparam int unsigned TAG_DIV  = 128; // clock = 128 x revolution frequency
  localparam int unsigned FPROG_W  = 23;  // revolution frequency word from the programme
  localparam int unsigned FREV_W   = 18;  // MSBs of it that are used
  localparam int unsigned RF_W     = 24;  // h_int x frev product
  localparam int unsigned RFT_W    = 18;  // digital RF truncated for the delay multiplier
  localparam int unsigned DLY_W    = 14;  // binary delay in ns
  localparam int unsigned PO_W     = 16;  // phase offset
  localparam int unsigned PO_LSB   = 7;   // phase offset = product[PO_LSB+15:PO_LSB]
  localparam int unsigned HN_PULSES = 16; // pulses in one harmonic number train
endpackage
