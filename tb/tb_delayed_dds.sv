// tb_delayed_dds: end-to-end test of the delayed-output DDS at its default
// (and only) size.
// A tagged 55.6 MHz clock (tag every 128 clocks), pulse trains through the
// delay-line/timer model, and a revolution frequency word for f_rev =
// f_clock/128 drive the design. The test walks through: loading h from an
// external train, the accumulator reset on the first tag after a new integer
// h, the phase offset for a 5000 ns and a 1234 ns delay added and subtracted,
// output inversion by sgn, a run of missing tags (internal tag takes over,
// tag error, blank), a bad 15-pulse train (h error, blank), the ACCU_RESET
// jumper, and the internal generator with fixed and stepping harmonic numbers.
// In quiet windows every output word is compared with sine/cosine values
// worked out here from the accumulator, the expected offset and the switches.
// Each mechanism is counted, and one that never happened is a failure.
module tb_delayed_dds;
  localparam realtime TCLK_NS = 18.0;

  logic        tclk, tclk_dly, is_tag, skip_tag = 1'b0;
  int          npulse;
  logic        rst_n = 1'b1;
  logic        ext_sdata = 1'b0, use_internal = 1'b0, sdata, sddly, sdto;
  logic [22:0] fprog = '0;
  logic        strobe = 1'b0;
  logic [15:0] delay_bcd = '0;
  logic        dly_sub = 1'b0, blank = 1'b0, sgn = 1'b0;
  logic [15:0] hnm = '0;
  logic        accu_rs = 1'b0, hn_enbl = 1'b0, hn_var = 1'b0;
  logic [11:0] sin_o, cos_o, ahn, phi_off;
  logic [15:0] arf;
  logic        pa_reset, h_err, tag_err, sdout, lf_out;
  logic [16:0] pa_bus;

  int checks = 0, failures = 0;

  tclk_source #(.PERIOD_NS(TCLK_NS)) src (.skip_tag, .tclk, .tclk_dly, .is_tag, .n(npulse));

  assign sdata = use_internal ? sdout : ext_sdata;   // the ST11 selector
  sd_frontend fe (.sdata, .sddly, .sdto);

  delayed_dds dut (
    .tclk, .tclk_dly, .rst_n, .sdata, .sddly, .sdto, .fprog, .strobe,
    .delay_bcd, .dly_sub, .blank, .sgn, .hnm, .accu_rs, .hn_enbl, .hn_var,
    .sin_o, .cos_o, .ahn, .phi_off, .arf, .pa_reset, .h_err, .tag_err,
    .pa_bus, .sdout, .lf_out);

  // a falling reset edge at the start, so that asynchronous clears act
  initial #1 rst_n = 1'b0;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic send_train(input logic [15:0] word, input int n);
    for (int i = 0; i < n; i++) begin
      logic b;
      b = word[15 - (i % 16)];
      ext_sdata = 1'b1;
      #(b ? 125.0 : 62.5);
      ext_sdata = 1'b0;
      #(b ? 125.0 : 187.5);
    end
    #(6us);
  endtask

  task automatic do_strobe();
    strobe = 1'b1;
    #(300);
    strobe = 1'b0;
    #(700);
  endtask

  task automatic cycles(int n);
    repeat (n) @(posedge tclk);
  endtask

  // ---------------- reference values ----------------
  // frequency word: LSB = 1e9/2^34 Hz
  function automatic logic [22:0] freq_word(real hz);
    return 23'($rtoi(hz * 17.179869184 + 0.5));
  endfunction

  function automatic int bcd2int(logic [15:0] b);
    return 1000 * b[15:12] + 100 * b[11:8] + 10 * b[7:4] + b[3:0];
  endfunction

  // expected phase offset from the truncated products
  function automatic int exp_po(logic [22:0] f, logic [15:0] hh, int d);
    longint rft;
    rft = (longint'(hh[15:10]) * longint'(f[22:5])) >> 6;
    return int'(((rft * longint'(d)) >> 7) & 16'hFFFF);
  endfunction

  function automatic int word(real s);
    if (s >= 0.0) return 2048 + $rtoi($floor(2048.0 * s));
    else          return 2047 - $rtoi($floor(-2048.0 * s));
  endfunction

  // ---------------- output checker ----------------
  int  po_exp = 0;           // offset the design should be using
  bit  checking = 1'b0;      // compare output words in this window
  int  cyc = 0;
  int  phase_hist[8];
  int  word_checks = 0;

  always @(posedge tclk) begin
    #1;
    cyc++;
    for (int i = 7; i > 0; i--) phase_hist[i] = phase_hist[i-1];
    phase_hist[0] = int'(pa_bus);
    if (checking && cyc > 8) begin
      int a, sum, ws, wc;
      real th;
      sum = dly_sub ? (phase_hist[3] / 2 - po_exp) : (phase_hist[3] / 2 + po_exp);
      a   = ((sum % 65536 + 65536) % 65536) / 4;
      th  = 6.283185307179586 * (real'(a) + 0.5) / 16384.0;
      ws  = word($sin(th));
      wc  = word($cos(th));
      if (sgn) begin ws = 4095 - ws; wc = 4095 - wc; end
      checks += 2;
      word_checks++;
      if (int'(sin_o) - ws > 1 || ws - int'(sin_o) > 1 || int'(cos_o) - wc > 1 || wc - int'(cos_o) > 1) begin
        failures++;
        if (failures < 20)
          $display("FAIL words at %0t: sin %0d want %0d, cos %0d want %0d", $time, sin_o, ws, cos_o, wc);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_parst = 0, n_tag_seen = 0, n_parst_on_internal = 0;
  always @(posedge is_tag) n_tag_seen++;
  always @(posedge tclk) begin
    if (pa_reset) begin
      n_parst++;
      if (skip_tag) n_parst_on_internal++;
    end
  end

  int n_h_load = 0, n_h_err = 0, n_tag_err = 0, n_blank_clear = 0;
  int n_accu = 0, n_sgn = 0, n_sub = 0, n_internal = 0, n_var = 0, n_strobe = 0;
  int n_frac = 0;

  // phase seen on the tag cycles after a reset: must repeat for integer h
  task automatic check_tag_phase(input string what);
    int p0;
    @(posedge is_tag);
    @(posedge tclk);
    #2 p0 = int'(pa_bus);
    for (int r = 0; r < 3; r++) begin
      @(posedge is_tag);
      @(posedge tclk);
      #2 check(int'(pa_bus) == p0, $sformatf("%s: phase at tag %0d, first %0d", what, pa_bus, p0));
    end
  endtask

  task automatic window(input string what);
    int po_dut;
    checking = 1'b1;
    cycles(1500);
    checking = 1'b0;
    // phi_off test word: offset binary of the signed offset's 12 MSBs
    po_dut = dly_sub ? ((65536 - po_exp) % 65536) : po_exp;
    check(int'(phi_off) == ((po_dut >> 4) ^ 12'h800), $sformatf("%s: phi_off %h", what, phi_off));
  endtask

  initial begin
    logic [22:0] f;
    real frev, turns;
    int  d, p;
    frev = 1.0e9 / TCLK_NS / 128.0;
    f    = freq_word(frev);

    cycles(5);
    rst_n = 1'b1;
    cycles(400);
    check(!tag_err && !h_err, "no errors after start-up");

    // revolution frequency and delay 5000 ns, adding
    fprog = f;
    delay_bcd = 16'h5000;
    d = 5000;

    // external h = 10.0: load, then reset on the next tag
    send_train(16'd10 << 10, 16);
    n_h_load++;
    check(ahn == 12'((10 << 10) >> 4), $sformatf("ahn %h after h=10", ahn));
    check(n_parst == 1, $sformatf("one accumulator reset after h=10 (%0d)", n_parst));
    check_tag_phase("h=10");

    // frequency: with h = 10, 128 clocks = 10 turns (checked above), and the
    // accumulator steps by h every clock
    @(posedge tclk) #2 p = int'(pa_bus);
    @(posedge tclk) #2 check(((int'(pa_bus) - p + 131072) % 131072) == (10 << 10) || pa_reset,
                             "accumulator step h");

    repeat (3) begin do_strobe(); n_strobe++; end
    po_exp = exp_po(f, 16'd10 << 10, d);
    check(int'(phi_off) == ((po_exp >> 4) ^ 12'h800), $sformatf("phi_off %h for po %0d", phi_off, po_exp));
    turns = 10.0 * frev * real'(d) * 1.0e-9;
    check((po_exp - $rtoi((turns - $floor(turns)) * 65536.0)) inside {[-130:130]},
          $sformatf("po %0d vs ideal %f turn", po_exp, turns - $floor(turns)));
    check(arf == 16'((longint'(10) * longint'(f[22:5])) >> 8), "arf test word");
    window("add 5000 ns");

    dly_sub = 1'b1; n_sub++;
    cycles(10);
    window("subtract 5000 ns");

    sgn = 1'b1; n_sgn++;
    cycles(10);
    window("sgn inverted");
    sgn = 1'b0;
    dly_sub = 1'b0;

    // new delay: reaches po on the second strobe
    delay_bcd = 16'h1234;
    d = 1234;
    repeat (2) begin do_strobe(); n_strobe++; end
    po_exp = exp_po(f, 16'd10 << 10, d);
    cycles(10);
    window("add 1234 ns");

    // missing tags: the internal tag takes over, tag error, new h resets on it
    @(negedge is_tag);
    skip_tag = 1'b1;
    send_train(16'd12 << 10, 16);
    n_h_load++;
    cycles(300);
    check(tag_err, "tag error on missing tags");
    if (tag_err) n_tag_err++;
    check(n_parst_on_internal == 1, $sformatf("reset on the internal tag (%0d)", n_parst_on_internal));
    cycles(128 * 2);
    skip_tag = 1'b0;
    cycles(300);
    blank = 1'b1; cycles(5); blank = 1'b0; cycles(5);
    check(!tag_err, "blank clears tag error");
    if (!tag_err) n_blank_clear++;
    check_tag_phase("h=12");

    // bad train
    send_train(16'h1234, 15);
    check(h_err, "h error after 15 pulses");
    if (h_err) n_h_err++;
    check(ahn == 12'((12 << 10) >> 4), "h kept after a bad train");
    blank = 1'b1; cycles(5); blank = 1'b0; cycles(5);
    check(!h_err, "blank clears h error");
    if (!h_err) n_blank_clear++;

    // ACCU_RESET
    accu_rs = 1'b1; n_accu++;
    cycles(200);
    check(pa_bus == 0, "ACCU_RESET holds the accumulator at zero");
    repeat (3) begin do_strobe(); n_strobe++; end
    po_exp = exp_po(f, 16'd12 << 10, d);
    checking = 1'b1; cycles(300); checking = 1'b0;   // outputs show the offset alone
    accu_rs = 1'b0;
    cycles(10);

    // internal generator, fixed word 10.5: loaded, no reset (fraction)
    use_internal = 1'b1;
    hnm = 16'h2A00;
    p = n_parst;
    hn_enbl = 1'b1; cycles(10); hn_enbl = 1'b0;
    #(6us);
    check(ahn == 12'(16'h2A00 >> 4), $sformatf("internal word loaded, ahn %h", ahn));
    if (ahn == 12'(16'h2A00 >> 4)) n_internal++;
    cycles(600);
    check(n_parst == p, "no reset for a fractional h");
    @(posedge tclk) #2 p = int'(pa_bus);
    @(posedge tclk) #2 check(((int'(pa_bus) - p + 131072) % 131072) == 16'h2A00, "accumulator step 10.5");
    n_frac++;

    // stepping harmonic: 8, then 9, each a new integer with a reset
    hn_var = 1'b1;
    for (int k = 8; k <= 9; k++) begin
      p = n_parst;
      hn_enbl = 1'b1; cycles(10); hn_enbl = 1'b0;
      #(6us);
      check(ahn == 12'((k << 10) >> 4), $sformatf("HN_VAR h=%0d, ahn %h", k, ahn));
      cycles(300);
      check(n_parst == p + 1, $sformatf("reset after HN_VAR h=%0d", k));
      if (n_parst == p + 1) n_var++;
    end
    hn_var = 1'b0;
    use_internal = 1'b0;
    check(!h_err && !tag_err, "no errors at the end");

    // every mechanism happened
    check(n_h_load >= 2, "external h loads");
    check(n_parst >= 4, $sformatf("accumulator resets %0d", n_parst));
    check(n_tag_seen >= 10, "tags sent");
    check(n_parst_on_internal >= 1, "internal tag replaced a missing tag");
    check(n_tag_err >= 1, "tag error");
    check(n_h_err >= 1, "h error");
    check(n_blank_clear >= 2, "blank");
    check(n_accu >= 1 && n_sgn >= 1 && n_sub >= 1, "ACCU_RESET, SGN, subtract");
    check(n_strobe >= 8, "strobes");
    check(n_internal >= 1 && n_var >= 2 && n_frac >= 1, "internal generator, HN_VAR, fractional h");
    check(word_checks > 5000, $sformatf("output words compared: %0d", word_checks));
    $display("mechanisms: h loads %0d, resets %0d (on internal tag %0d), tags %0d, tag errors %0d, h errors %0d, blanks %0d, strobes %0d, HN_VAR steps %0d",
             n_h_load, n_parst, n_parst_on_internal, n_tag_seen, n_tag_err, n_h_err, n_blank_clear, n_strobe, n_var);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
