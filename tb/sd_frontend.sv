// sd_frontend: behavioural model of the board parts in front of the harmonic
// number receiver (not synthesizable). The delay line delays the pulse train
// sdata by DLY_NS to give sddly (transport delay, every edge kept). The timer
// is triggered by a rising edge of sdata while idle and then holds sdto high
// for TO_NS; it does not retrigger. Defaults are the board's 90 ns delay line
// and 4.5 us timer.
module sd_frontend #(
  parameter realtime DLY_NS = 90.0,
  parameter realtime TO_NS  = 4500.0
) (
  input  logic sdata,
  output logic sddly,
  output logic sdto
);
  // The timer output starts high for 1 ns and then drops: two-state
  // simulators need that edge for the level-sensitive clear of the pulse
  // counter downstream to act at power-up.
  initial begin
    sddly = 1'b0;
    sdto  = 1'b1;
    #1 sdto = 1'b0;
  end

  always @(posedge sdata) fork
    begin
      #(DLY_NS) sddly = 1'b1;
    end
  join_none

  always @(negedge sdata) fork
    begin
      #(DLY_NS) sddly = 1'b0;
    end
  join_none

  always @(posedge sdata)
    if (!sdto) begin
      sdto = 1'b1;
      #(TO_NS) sdto = 1'b0;
    end
endmodule
