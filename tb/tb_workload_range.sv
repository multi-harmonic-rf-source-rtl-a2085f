// tb_workload_range: the delay compensation measured as a time shift, at the
// ends of the clock range and at the reference measurement setting.
// For each case the design runs with a tagged clock of the given frequency,
// f_rev = f_clock/128 and an integer harmonic h. The testbench finds the
// rising mid-scale crossings of sin_o by linear interpolation between samples.
// It checks that one revolution holds exactly h output periods, and that the
// mean output period is 1/(h f_rev). It then records the crossing time
// relative to the tag with no delay, sets the delay, and checks that the
// crossings move earlier (delay added) or later (delay subtracted) by the
// delay, modulo one output period, to within 2 ns.
//   case 1: 61.2 MHz clock, h = 8   (3.83 MHz),  9999 ns added
//   case 2: 53.2 MHz clock, h = 24  (9.98 MHz),  5000 ns subtracted
//   case 3: 55.0 MHz clock, h = 10  (4.30 MHz),  5000 ns added
module tb_workload_range;
  logic        tclk = 1'b0, tclk_dly = 1'b0, rst_n = 1'b1;
  logic        sdata = 1'b0, sddly, sdto;
  logic [22:0] fprog = '0;
  logic        strobe = 1'b0;
  logic [15:0] delay_bcd = '0;
  logic        dly_sub = 1'b0;
  logic [11:0] sin_o, cos_o, ahn, phi_off;
  logic [15:0] arf;
  logic        pa_reset, h_err, tag_err, sdout, lf_out;
  logic [16:0] pa_bus;

  int checks = 0, failures = 0;
  realtime period = 18.0;
  realtime last_tag = 0;
  bit      running = 1'b0;

  sd_frontend fe (.sdata, .sddly, .sdto);

  delayed_dds dut (
    .tclk, .tclk_dly, .rst_n, .sdata, .sddly, .sdto, .fprog, .strobe,
    .delay_bcd, .dly_sub, .blank(1'b0), .sgn(1'b0), .hnm(16'h0), .accu_rs(1'b0),
    .hn_enbl(1'b0), .hn_var(1'b0),
    .sin_o, .cos_o, .ahn, .phi_off, .arf, .pa_reset, .h_err, .tag_err,
    .pa_bus, .sdout, .lf_out);

  initial #1 rst_n = 1'b0;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // tagged clock with a variable period; tag = quarter-period pulse every 128
  initial begin
    int n;
    n = 0;
    forever begin
      bit t;
      t = (n % 128 == 0);
      if (t) last_tag = $realtime;
      tclk = 1'b1;
      #(t ? period / 4 : period / 2);
      tclk = 1'b0;
      #(t ? 3 * period / 4 : period / 2);
      n++;
    end
  end
  always @(posedge tclk) fork
    begin
      #(3 * period / 8) tclk_dly = 1'b1;
    end
  join_none
  always @(negedge tclk) fork
    begin
      #(3 * period / 8) tclk_dly = 1'b0;
    end
  join_none

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_train(input logic [15:0] word);
    for (int i = 0; i < 16; i++) begin
      logic b;
      b = word[15 - i];
      sdata = 1'b1;
      #(b ? 125.0 : 62.5);
      sdata = 1'b0;
      #(b ? 125.0 : 187.5);
    end
    #(6us);
  endtask

  task automatic strobes(int n);
    repeat (n) begin
      strobe = 1'b1; #(300); strobe = 1'b0; #(700);
    end
  endtask

  // rising mid-scale crossings of sin_o
  realtime xs[$];
  realtime t_prev;
  int      s_prev = 0;
  always @(posedge tclk) begin
    #0.1;
    if (running && s_prev < 2048 && int'(sin_o) >= 2048)
      xs.push_back(t_prev + period * (2047.5 - real'(s_prev)) / real'(int'(sin_o) - s_prev));
    t_prev = $realtime;
    s_prev = int'(sin_o);
  end

  // crossing time after the tag that starts a revolution, and crossing count
  task automatic measure(output realtime rel, output int count, output realtime mean_p);
    realtime t0;
    wait (tclk == 1'b0);
    @(posedge tclk iff ($realtime - last_tag < 0.01));   // a tag edge
    t0 = $realtime;
    xs.delete();
    running = 1'b1;
    repeat (128) @(posedge tclk);
    #(period / 2);
    running = 1'b0;
    count = xs.size();
    rel = (count > 0) ? xs[0] - t0 : 0.0;
    mean_p = (count > 1) ? (xs[count-1] - xs[0]) / real'(count - 1) : 0.0;
  endtask

  task automatic run_case(input real f_mhz, input int h, input int d, input bit sub);
    realtime r0, r1, mp, p_rf, diff;
    real frev;
    int c0, c1;
    logic [15:0] bcd;
    period = 1000.0 / f_mhz;
    frev = f_mhz * 1.0e6 / 128.0;
    p_rf = 1.0e9 / (real'(h) * frev);
    bcd = {4'(d / 1000), 4'((d / 100) % 10), 4'((d / 10) % 10), 4'(d % 10)};
    rst_n = 1'b0;
    #(10 * period);
    rst_n = 1'b1;
    fprog = 23'($rtoi(frev * 17.179869184 + 0.5));
    delay_bcd = 16'h0000;
    dly_sub = sub;
    send_train(16'(h << 10));
    strobes(3);
    #(5 * 128 * period);
    measure(r0, c0, mp);
    check(c0 == h, $sformatf("%0.1f MHz h=%0d: %0d periods per revolution", f_mhz, h, c0));
    check(mp > p_rf * 0.999 && mp < p_rf * 1.001,
          $sformatf("%0.1f MHz h=%0d: output period %0.3f ns, want %0.3f", f_mhz, h, mp, p_rf));
    delay_bcd = bcd;
    strobes(3);
    #(2 * 128 * period);
    measure(r1, c1, mp);
    // delay added: output earlier by d; subtracted: later by d
    diff = sub ? (r1 - r0 - real'(d)) : (r0 - r1 - real'(d));
    diff = diff - p_rf * $floor(diff / p_rf + 0.5);
    check(diff > -2.0 && diff < 2.0,
          $sformatf("%0.1f MHz h=%0d delay %0d ns %s: shift off by %0.2f ns",
                    f_mhz, h, d, sub ? "sub" : "add", diff));
    $display("case %0.1f MHz h=%0d f_RF=%0.3f MHz delay %0d ns: shift error %0.3f ns",
             f_mhz, h, 1.0e3 / p_rf, d, diff);
    check(!h_err && !tag_err, "no errors");
  endtask

  initial begin
    #(100);
    run_case(61.2, 8, 9999, 1'b0);
    run_case(53.2, 24, 5000, 1'b1);
    run_case(55.0, 10, 5000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
