// tb_phase_accumulator: self-checking test of the 17-bit phase accumulator.
// Compares the phase every cycle with a running sum kept in the testbench,
// checks that with an integer harmonic h the phase repeats after 128 clocks
// (h whole turns per revolution), that parst clears the phase for one cycle
// and that accu_reset holds it at zero.
module tb_phase_accumulator;
  logic        tclk = 1'b0, rst_n = 1'b0, parst = 1'b0, accu_reset = 1'b0;
  logic [15:0] h = '0;
  logic [16:0] phase;
  int checks = 0, failures = 0;
  longint model = 0;

  always #9 tclk = ~tclk;

  phase_accumulator dut (.tclk, .rst_n, .h, .parst, .accu_reset, .phase);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // model: the inputs sampled at an edge decide the phase after it
  always @(posedge tclk) if (rst_n) begin
    if (parst || accu_reset) model = 0;
    else                     model = (model + longint'(h)) % (longint'(1) << 17);
    #1;
    checks++;
    if (longint'(phase) != model) begin
      failures++;
      $display("FAIL phase %0d want %0d at %0t", phase, model, $time);
    end
  end

  initial begin
    logic [16:0] p0;
    repeat (3) @(posedge tclk);
    rst_n <= 1'b1;
    // integer harmonic 10: 128 clocks are exactly 10 turns
    h <= 16'd10 << 10;
    repeat (5) @(posedge tclk);
    #2 p0 = phase;
    repeat (128) @(posedge tclk);
    #2;
    checks++;
    if (phase != p0) begin failures++; $display("FAIL phase not periodic over 128 clocks"); end
    // random h, with occasional parst pulses
    for (int i = 0; i < 2000; i++) begin
      @(posedge tclk);
      if (i % 50 == 0) h <= 16'($urandom);
      parst <= ($urandom % 97) == 0;
    end
    @(posedge tclk);
    parst <= 1'b0;
    // accu_reset held
    accu_reset <= 1'b1;
    repeat (20) @(posedge tclk);
    #2;
    checks++;
    if (phase != 0) begin failures++; $display("FAIL accu_reset does not hold zero"); end
    @(posedge tclk);
    accu_reset <= 1'b0;
    repeat (20) @(posedge tclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
