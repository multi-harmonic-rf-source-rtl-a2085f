// tb_phase_offset_adder: self-checking test of the phase offset adder.
// For random accumulator values and offsets, in both switch positions, checks
// the registered ROM address against (phase/2 +/- po) mod 2^16, keeping the
// 14 MSBs, computed here with integer arithmetic.
module tb_phase_offset_adder;
  logic        tclk = 1'b0, rst_n = 1'b0, sub = 1'b0;
  logic [16:0] phase = '0;
  logic [15:0] po = '0;
  logic [13:0] addr;
  int checks = 0, failures = 0;

  always #9 tclk = ~tclk;

  phase_offset_adder dut (.tclk, .rst_n, .phase, .po, .sub, .addr);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    int a, e;
    repeat (3) @(posedge tclk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge tclk);
      phase = 17'($urandom);
      po    = 16'($urandom);
      sub   = 1'($urandom);
      if (i < 4) begin phase = 17'h1FFFF; po = 16'h0001; sub = 1'(i); end
      a = sub ? (int'(phase >> 1) - int'(po)) : (int'(phase >> 1) + int'(po));
      e = ((a % 65536 + 65536) % 65536) >> 2;
      @(posedge tclk);
      #1;
      checks++;
      if (int'(addr) != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL phase=%h po=%h sub=%b addr=%h want %h", phase, po, sub, addr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
