// tb_hmult_sync: self-checking test of the phase offset multipliers and the
// strobe synchronism pulses.
// Checks that each strobe gives sync1, sync2, sync3 once each on consecutive
// cycles, that a new frequency/harmonic/delay reaches the phase offset on the
// third strobe (not before), that po and arf equal the truncated products
// worked out here, and that for a physical case (f_rev = 477 kHz, h = 10,
// delay 5000 ns: 23.85 turns) po is within 0.2% of a turn of 0.85 turn.
module tb_hmult_sync;
  logic        tclk = 1'b0, rst_n = 1'b0, strobe = 1'b0;
  logic [22:0] fprog = '0;
  logic [15:0] h = '0;
  logic [13:0] delay = '0;
  logic        sync1, sync2, sync3;
  logic [15:0] po, arf;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n3 = 0, seq_err = 0;
  logic s1q = 0, s2q = 0;

  always #9 tclk = ~tclk;

  hmult_sync dut (.tclk, .rst_n, .strobe, .fprog, .h, .delay,
                  .sync1, .sync2, .sync3, .po, .arf);

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  always @(posedge tclk) begin
    #1;
    n1 += sync1; n2 += sync2; n3 += sync3;
    if ((sync2 != s1q) || (sync3 != s2q) || (sync1 + sync2 + sync3 > 1)) seq_err++;
    s1q = sync1; s2q = sync2;
  end

  task automatic do_strobe();
    strobe = 1'b1;
    repeat (10) @(posedge tclk);
    strobe = 1'b0;
    repeat (10) @(posedge tclk);
  endtask

  function automatic longint exp_po(logic [22:0] f, logic [15:0] hh, logic [13:0] d);
    longint rf, rft;
    rf  = longint'(hh[15:10]) * longint'(f[22:5]);
    rft = rf >> 6;
    return ((rft * longint'(d)) >> 7) & 16'hFFFF;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [22:0] f1;
    longint e, e_old;
    real turns;
    int err;
    repeat (3) @(posedge tclk);
    rst_n = 1'b1;
    repeat (3) @(posedge tclk);

    // sync pulses: 3 cycles from strobe to sync1
    begin
      int lat;
      lat = 0;
      #3 strobe = 1'b1;
      do begin
        @(posedge tclk);
        #2 lat++;
      end while (!sync1 && lat < 10);
      check(lat == 3, $sformatf("sync1 %0d clocks after strobe, want 3", lat));
    end
    repeat (12) @(posedge tclk);
    strobe = 1'b0;
    repeat (5) @(posedge tclk);

    // physical case
    f1 = 23'($rtoi(477.0e3 * 17.179869184 + 0.5));   // 2^34 / 1e9 = 17.18 per Hz
    fprog = f1; h = 16'd10 << 10; delay = 14'd5000;
    e_old = po;
    do_strobe();
    check(longint'(po) == e_old, "po unchanged after the first strobe");
    do_strobe();
    check(longint'(po) == e_old, "po unchanged after the second strobe");
    do_strobe();
    e = exp_po(f1, h, delay);
    check(longint'(po) == e, $sformatf("po %0d want %0d", po, e));
    check(longint'(arf) == ((longint'(10) * longint'(f1[22:5])) >> 8), "arf");
    turns = 10.0 * 477.0e3 * 5000.0e-9;
    err = int'(po) - $rtoi((turns - $floor(turns)) * 65536.0);
    check(err > -130 && err < 130, $sformatf("po %0d is %0d LSB from the ideal offset", po, err));

    // random cases
    for (int i = 0; i < 30; i++) begin
      fprog = 23'($urandom); h = 16'($urandom); delay = 14'($urandom % 10000);
      do_strobe();
      do_strobe();
      do_strobe();
      e = exp_po(fprog, h, delay);
      check(longint'(po) == e, $sformatf("po %0d want %0d", po, e));
      check(longint'(arf) == ((longint'(h[15:10]) * longint'(fprog[22:5])) >> 8), "arf random");
    end

    check(n1 == 94 && n2 == 94 && n3 == 94, $sformatf("sync counts %0d %0d %0d", n1, n2, n3));
    check(seq_err == 0, "sync1, sync2, sync3 on consecutive cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
