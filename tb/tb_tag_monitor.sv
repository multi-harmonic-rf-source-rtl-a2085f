// tb_tag_monitor: self-checking test of the internal tag, tag strobe and tag
// error. External tags are driven every 128 cycles, then one is left out, then
// one arrives early. A reference model in the testbench (first tag starts a
// modulo-128 count; the internal tag falls on multiples of 128 after it) is
// compared with itag, tagstb and tag_err every cycle, and blank is checked to
// clear the error.
module tb_tag_monitor;
  logic tclk = 1'b0, rst_n = 1'b0, tag = 1'b0, blank = 1'b0;
  logic itag, tagstb, tag_err, synced;
  int   checks = 0, failures = 0;
  int   cyc = 0, t0 = -1;
  logic exp_err = 1'b0;
  int   missing_filled = 0;

  always #9 tclk = ~tclk;

  tag_monitor dut (.tclk, .rst_n, .tag, .blank, .itag, .tagstb, .tag_err, .synced);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // tag schedule: first tag at cycle 40, then every 128; the 4th is missing,
  // the 7th comes 5 cycles early; blank around cycle 40+128*5
  function automatic bit tag_at(int c);
    int k;
    if (c < 40) return 0;
    if ((c - 40) % 128 == 123 && (c - 40) / 128 == 6) return 1;   // early
    if ((c - 40) % 128 != 0) return 0;
    k = (c - 40) / 128;
    if (k == 3) return 0;                                          // missing
    if (k == 7) return 0;                                          // replaced by the early one
    return 1;
  endfunction

  // k counts rising edges after reset; t_in/b_in are the inputs registered at
  // edge k. The first tag registered at edge t0 starts the count; the internal
  // tag is high after edges t0+127, t0+255, ... so that it coincides with the
  // tags registered at t0+128, t0+256, ...
  int   k = 0;
  logic itag_prev = 1'b0;

  function automatic logic e_itag(int e);
    return (t0 >= 0) && (e > t0) && ((e - t0) % 128 == 127);
  endfunction

  always @(posedge tclk) begin
    if (rst_n) begin
      logic t_in, b_in;
      t_in = tag;
      b_in = blank;
      k++;
      if (b_in)                                  exp_err = 1'b0;
      else if (t0 >= 0 && k > t0 && (t_in ^ itag_prev)) exp_err = 1'b1;
      if (t0 < 0 && t_in) t0 = k;
      #1;
      checks += 3;
      if (itag !== e_itag(k)) begin failures++; $display("FAIL itag edge %0d", k); end
      if (tagstb !== (tag | e_itag(k))) begin failures++; $display("FAIL tagstb edge %0d", k); end
      if (tag_err !== exp_err) begin failures++; $display("FAIL tag_err edge %0d got %b", k, tag_err); end
      if (e_itag(k) && !tag) missing_filled++;
      itag_prev = e_itag(k);
    end
  end

  initial begin
    repeat (3) @(posedge tclk);
    rst_n <= 1'b1;
    repeat (10 * 128 + 60) begin
      @(posedge tclk);
      cyc++;
      tag   <= tag_at(cyc);
      blank <= (cyc >= 40 + 128 * 5 && cyc < 40 + 128 * 5 + 3);
    end
    checks++;
    if (missing_filled < 2) begin
      failures++;
      $display("FAIL internal tag never replaced a missing tag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
