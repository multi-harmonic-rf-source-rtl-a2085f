// phase_offset_adder: applies the delay phase offset to the accumulator.
// The 16 MSBs of the 17-bit phase accumulator and the 16-bit phase offset po
// (both with one turn = 2^16) are added, or po is subtracted, as selected by
// the front-panel +/- DELAY switch (sub = 1 subtracts). The sum, modulo one
// turn, is truncated to its 14 MSBs, the sine/cosine ROM address. The
// operation follows the source; the choice of the accumulator's 16 MSBs
// follows the 16-bit bus drawn into the adder. The result is registered, one
// cycle of latency, as the first stage of the pipelined ROM path.
module phase_offset_adder
  import mhsdo_pkg::*;
(
  input  logic              tclk,
  input  logic              rst_n,
  input  logic [ACC_W-1:0]  phase,  // phase accumulator
  input  logic [PO_W-1:0]   po,     // phase offset
  input  logic              sub,    // 1: subtract the offset
  output logic [ADDR_W-1:0] addr    // ROM address
);
  logic [PO_W-1:0] sum;

  assign sum = sub ? (phase[ACC_W-1:ACC_W-PO_W] - po)
                   : (phase[ACC_W-1:ACC_W-PO_W] + po);

  always_ff @(posedge tclk or negedge rst_n)
    if (!rst_n) addr <= '0;
    else        addr <= sum[PO_W-1:PO_W-ADDR_W];
endmodule
