// tb_hn_receiver: self-checking test of the serial harmonic number receiver.
// Pulse trains in the external format (250 ns period, 62.5 ns pulse for a 0,
// 125 ns for a 1, MSB first) go through the delay-line and timer model. The
// test checks that correct trains load h with the sent word within a few
// clocks of the last pulse, that trains of 15 or 17 pulses set h_err, that a
// short train does not load h, and that blank clears h_err.
module tb_hn_receiver;
  localparam realtime TCLK_NS = 18.0;

  logic        tclk = 1'b0, rst_n = 1'b1, sdata = 1'b0, blank = 1'b0;
  logic        sddly, sdto;
  logic [15:0] h;
  logic        h_load, h_err;
  int checks = 0, failures = 0;
  realtime last_edge;

  always #(TCLK_NS / 2) tclk = ~tclk;

  sd_frontend fe (.sdata, .sddly, .sdto);
  hn_receiver dut (.tclk, .rst_n, .sdata, .sddly, .sdto, .blank, .h, .h_load, .h_err);

  // a falling reset edge at the start, so that asynchronous clears act
  initial #1 rst_n = 1'b0;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // send n pulses of word, MSB first
  task automatic send_train(input logic [15:0] word, input int n);
    for (int i = 0; i < n; i++) begin
      logic b;
      b = (i < 16) ? word[15 - i] : 1'b1;
      sdata = 1'b1;
      #(b ? 125.0 : 62.5);
      sdata = 1'b0;
      #(b ? 125.0 : 187.5);
    end
    last_edge = $realtime - 250.0 + 90.0;   // last sddly rising edge
  endtask

  // latency of h_load after the last sddly edge, in TCLK periods
  realtime load_time;
  always @(posedge h_load) load_time = $realtime;

  initial begin
    logic [15:0] w, prev;
    repeat (3) @(posedge tclk);
    rst_n = 1'b1;
    repeat (3) @(posedge tclk);

    for (int k = 0; k < 20; k++) begin
      w = 16'($urandom);
      if (k == 0) w = 16'h0000;
      if (k == 1) w = 16'hFFFF;
      if (k == 2) w = 16'h2800;    // h = 10
      load_time = 0;
      send_train(w, 16);
      #(5us);
      check(h == w, $sformatf("h loaded %h want %h", h, w));
      check(load_time > last_edge && load_time - last_edge <= 4 * TCLK_NS,
            $sformatf("h_load latency %0.1f ns", load_time - last_edge));
      check(!h_err, "no h error on a 16-pulse train");
    end

    // 15 pulses: error, h not reloaded
    prev = h;
    send_train(16'h1234, 15);
    #(5us);
    check(h_err, "h error after 15 pulses");
    check(h == prev, "h kept after a 15-pulse train");

    // blank clears
    blank = 1'b1;
    repeat (3) @(posedge tclk);
    blank = 1'b0;
    repeat (2) @(posedge tclk);
    check(!h_err, "blank clears h error");

    // good train after blank: no error
    send_train(16'h4C00, 16);
    #(5us);
    check(!h_err && h == 16'h4C00, "good train after blank");

    // 17 pulses: error
    send_train(16'h5555, 17);
    #(5us);
    check(h_err, "h error after 17 pulses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
