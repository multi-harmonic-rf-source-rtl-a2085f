// tb_hnm_gen: self-checking test of the test harmonic number generator.
// Triggers trains with hn_enbl edges, measures every pulse of sdout in clocks
// (period 16, high 4 for a 0 and 8 for a 1 by default), decodes the 16 bits
// and checks them against the switch word, then, in HN_VAR mode, against the
// sequence 8, 9, ..., 20, 8, 9. Also checks the period of lf_out.
module tb_hnm_gen;
  logic        tclk = 1'b0, rst_n = 1'b0, hn_enbl = 1'b0, hn_var = 1'b0;
  logic [15:0] hnm = '0;
  logic        sdout, busy, lf_out;
  int checks = 0, failures = 0;

  always #9 tclk = ~tclk;

  hnm_gen #(.LF_DIV_W(6)) dut (.tclk, .rst_n, .hnm, .hn_enbl, .hn_var, .sdout, .busy, .lf_out);

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // receive one train: count high time and period of each pulse in clocks
  task automatic receive(output logic [15:0] w);
    int hi, per;
    w = '0;
    for (int b = 0; b < 16; b++) begin
      hi = 0; per = 0;
      while (sdout !== 1'b1) @(posedge tclk);
      while (sdout === 1'b1) begin @(posedge tclk); hi++; per++; end
      if (b < 15) begin
        while (sdout !== 1'b1) begin @(posedge tclk); per++; end
        check(per == 16, $sformatf("pulse period %0d clocks", per));
      end
      check(hi == 4 || hi == 8, $sformatf("pulse width %0d clocks", hi));
      w = {w[14:0], (hi == 8)};
    end
  endtask

  task automatic trigger();
    @(negedge tclk) hn_enbl = 1'b1;
    repeat (5) @(negedge tclk);
    hn_enbl = 1'b0;
  endtask

  initial begin
    logic [15:0] w;
    int hv;
    repeat (3) @(posedge tclk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) begin
      hnm = (i == 0) ? 16'h2800 : 16'($urandom);
      fork
        trigger();
        receive(w);
      join
      check(w == hnm, $sformatf("switch word %h sent as %h", hnm, w));
      repeat (20) @(posedge tclk);
      check(!busy && !sdout, "idle after the train");
    end
    hn_var = 1'b1;
    hv = 8;
    for (int i = 0; i < 16; i++) begin
      fork
        trigger();
        receive(w);
      join
      check(w == 16'(hv << 10), $sformatf("HN_VAR word %h want h=%0d", w, hv));
      hv = (hv == 20) ? 8 : hv + 1;
      repeat (20) @(posedge tclk);
    end
    // lf_out: period 2^6 clocks
    begin
      int t;
      @(posedge lf_out);
      t = 0;
      @(posedge tclk);
      while (lf_out) begin @(posedge tclk); t++; end
      while (!lf_out) begin @(posedge tclk); t++; end
      check(t == 64, $sformatf("lf_out period %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
