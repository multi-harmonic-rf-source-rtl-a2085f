// tb_d2b: self-checking test of the BCD-to-binary delay converter.
// Applies every legal four-digit setting 0000..9999 and compares the result
// with the decimal value of the digits, worked out in the testbench.
module tb_d2b;
  logic [15:0] bcd;
  logic [13:0] bin;
  int checks = 0, failures = 0;

  d2b dut (.bcd, .bin);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 9999; v++) begin
      bcd = {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
      #1;
      checks++;
      if (bin != 14'(v)) begin
        failures++;
        if (failures < 10) $display("d2b mismatch: bcd=%h got %0d want %0d", bcd, bin, v);
      end
    end
    // the largest setting, 9999 ns, fits the 14-bit delay word
    checks++;
    if (bin != 14'h270F) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
