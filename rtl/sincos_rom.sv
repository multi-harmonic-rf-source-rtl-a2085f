// sincos_rom: pipelined phase-to-amplitude mapping for the sine and cosine
// outputs.
// A 14-bit phase address (one turn = 2^14) is mapped to two 12-bit DAC words
// in offset binary (2048 = zero). Only a quarter wave is stored: 4096 words of
// 11-bit magnitude M[j] = floor(2048 * sin(2*pi*(j + 0.5)/16384)), computed
// at elaboration, so no table file is needed. The half-step offset makes the
// quarter-wave symmetries exact: in quadrants 1 and 3 the table is read at ~j,
// in quadrants 2 and 3 the word is negated, which in offset binary with
// codes 2048+M and 2047-M is a plain bit inversion. The cosine is the sine
// read a quarter turn (4096) further on. sgn inverts both outputs by adding
// half a turn to the address.
// The source names a sine ROM with 14-bit address and 12-bit SIN/COS outputs
// and refers elsewhere for its inside; the quarter-wave organisation, the
// rounding and offset binary coding are this design's choices.
// Timing: two register stages (magnitude, then output word); sin/cos for the
// address of cycle n appear in cycle n+2.
module sincos_rom
  import mhsdo_pkg::*;
(
  input  logic              tclk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic              sgn,   // 1: invert the output waveforms
  output logic [DAC_W-1:0]  sin_o,
  output logic [DAC_W-1:0]  cos_o
);
  localparam int unsigned QW = ADDR_W - 2;     // quarter-wave index width
  localparam int unsigned MW = DAC_W - 1;      // magnitude width
  localparam int unsigned QN = 1 << QW;

  typedef logic [MW-1:0] qtab_t [QN];

  function automatic qtab_t make_quarter();
    qtab_t t;
    real   pi2 = 6.283185307179586;
    for (int j = 0; j < QN; j++)
      t[j] = MW'($rtoi($floor(real'(1 << MW) *
                 $sin(pi2 * (real'(j) + 0.5) / real'(4 * QN)))));
    return t;
  endfunction

  localparam qtab_t QUARTER = make_quarter();

  logic [ADDR_W-1:0] a_sin, a_cos;
  logic [QW-1:0]     j_sin, j_cos;
  logic [MW-1:0]     m_sin, m_cos;
  logic              n_sin, n_cos;

  always_comb begin
    a_sin = addr ^ {sgn, {(ADDR_W-1){1'b0}}};
    a_cos = a_sin + ADDR_W'(QN);
    j_sin = a_sin[QW] ? ~a_sin[QW-1:0] : a_sin[QW-1:0];
    j_cos = a_cos[QW] ? ~a_cos[QW-1:0] : a_cos[QW-1:0];
  end

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) begin
      m_sin <= '0; m_cos <= '0; n_sin <= 1'b0; n_cos <= 1'b0;
      sin_o <= DAC_W'(1 << MW); cos_o <= DAC_W'(1 << MW);
    end else begin
      m_sin <= QUARTER[j_sin];
      m_cos <= QUARTER[j_cos];
      n_sin <= a_sin[ADDR_W-1];
      n_cos <= a_cos[ADDR_W-1];
      sin_o <= n_sin ? ~{1'b1, m_sin} : {1'b1, m_sin};
      cos_o <= n_cos ? ~{1'b1, m_cos} : {1'b1, m_cos};
    end
endmodule
