// tb_sincos_rom: self-checking test of the sine/cosine mapping.
// Sweeps all 16384 phase addresses, with and without sgn, one per clock, and
// compares sin_o and cos_o two cycles later with offset-binary words worked
// out here from $sin/$cos of the address centre (2048 + floor(2048*s) for
// s >= 0, 2047 - floor(-2048*s) otherwise), allowing one LSB for rounding of
// the real arithmetic. sgn must give the inverted word.
module tb_sincos_rom;
  logic        tclk = 1'b0, rst_n = 1'b0, sgn = 1'b0;
  logic [13:0] addr = '0;
  logic [11:0] sin_o, cos_o;
  int checks = 0, failures = 0, exact = 0;
  int pipe_a[2] = '{0, 0};
  bit pipe_s[2] = '{0, 0};
  int pipe_v = 0;

  always #9 tclk = ~tclk;

  sincos_rom dut (.tclk, .rst_n, .addr, .sgn, .sin_o, .cos_o);

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  function automatic int word(real s);
    if (s >= 0.0) return 2048 + $rtoi($floor(2048.0 * s));
    else          return 2047 - $rtoi($floor(-2048.0 * s));
  endfunction

  task automatic cmp(int got, int want, string what, int a);
    int d;
    checks++;
    d = got - want;
    if (d == 0) exact++;
    if (d > 1 || d < -1) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d got %0d want %0d", what, a, got, want);
    end
  endtask

  // the outputs after an edge belong to the address registered one edge
  // earlier (address in cycle n, words in cycle n+2)
  always @(posedge tclk) if (rst_n) begin
    int a;
    bit s;
    real th;
    a = pipe_a[0];
    s = pipe_s[0];
    #1;
    if (pipe_v >= 2) begin
      th = 6.283185307179586 * (real'(a) + 0.5) / 16384.0;
      cmp(int'(sin_o), s ? 4095 - word($sin(th)) : word($sin(th)), "sin", a);
      cmp(int'(cos_o), s ? 4095 - word($cos(th)) : word($cos(th)), "cos", a);
    end
  end

  always @(posedge tclk) if (rst_n) begin
    pipe_a[1] <= pipe_a[0];
    pipe_s[1] <= pipe_s[0];
    pipe_a[0] <= int'(addr);
    pipe_s[0] <= sgn;
    pipe_v    <= pipe_v + 1;
  end

  initial begin
    repeat (3) @(posedge tclk);
    rst_n <= 1'b1;
    for (int k = 0; k < 2 * 16384 + 4; k++) begin
      @(posedge tclk);
      addr <= 14'(k);
      sgn  <= (k >= 16384);
    end
    checks++;
    if (exact < checks * 99 / 100) begin
      failures++;
      $display("FAIL only %0d of %0d words exact", exact, checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
