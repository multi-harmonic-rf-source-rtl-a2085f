// tb_tag_detect: self-checking test of the tag detector.
// A is_tag clock with a short pulse every 128 clocks (and, for a while, with
// tags suppressed) drives the detector. For every clock edge the testbench
// checks that tag is high exactly in the cycle after a is_tag pulse.
module tb_tag_detect;
  logic tclk, tclk_dly, is_tag, tag, skip_tag = 1'b0, rst_n = 1'b0;
  logic is_tag_q = 1'b0;
  int   n;
  int   checks = 0, failures = 0, tags_seen = 0;

  tclk_source #(.PERIOD_NS(18.0)) src (.skip_tag, .tclk, .tclk_dly, .is_tag, .n);
  tag_detect dut (.tclk, .tclk_dly, .rst_n, .tag);

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // is_tag is valid from a rising edge to the next; remember it for one cycle
  always @(posedge tclk) begin
    #1;
    if (rst_n && n > 2) begin
      checks++;
      if (tag !== is_tag_q) begin
        failures++;
        $display("FAIL pulse %0d: tag=%b expected %b", n, tag, is_tag_q);
      end
      if (tag) tags_seen++;
    end
    is_tag_q = is_tag;
  end

  initial begin
    #50 rst_n = 1'b1;
    wait (n == 128 * 5 + 3);
    skip_tag = 1'b1;
    wait (n == 128 * 7 + 3);
    skip_tag = 1'b0;
    wait (n == 128 * 10 + 3);
    checks++;
    if (tags_seen != 8) begin
      failures++;
      $display("FAIL saw %0d tags, expected 8", tags_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
