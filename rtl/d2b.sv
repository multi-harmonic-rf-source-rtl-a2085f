// d2b: decimal-to-binary converter for the front-panel delay.
// The four rotating switches give the delay in nanoseconds as four BCD digits
// (thousands in bcd[15:12] down to units in bcd[3:0], 0..9999 ns). The module
// forms thousands*1000 + hundreds*100 + tens*10 + units as a 14-bit binary
// number (0..0x270F). Purely combinational; the value is latched downstream on
// sync2. The conversion is the source's; the digit order and the use of
// shift-and-add constant multiplies are this design's choice. A digit above 9
// is not a legal switch setting and is converted with its face value.
module d2b
  import mhsdo_pkg::*;
(
  input  logic [15:0]       bcd,   // DELAY[15..0] from the BCD switches
  output logic [DLY_W-1:0]  bin    // delay in ns, binary
);
  logic [3:0] d3, d2, d1, d0;
  logic [DLY_W+1:0] sum;

  always_comb begin
    {d3, d2, d1, d0} = bcd;
    // 1000 = 1024 - 16 - 8, 100 = 64 + 32 + 4, 10 = 8 + 2
    sum = ((DLY_W+2)'(d3) << 10) - ((DLY_W+2)'(d3) << 4) - ((DLY_W+2)'(d3) << 3)
        + ((DLY_W+2)'(d2) << 6) + ((DLY_W+2)'(d2) << 5) + ((DLY_W+2)'(d2) << 2)
        + ((DLY_W+2)'(d1) << 3) + ((DLY_W+2)'(d1) << 1)
        +  (DLY_W+2)'(d0);
    bin = sum[DLY_W-1:0];
  end
endmodule
