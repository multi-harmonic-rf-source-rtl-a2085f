// tb_pa_reset_ctrl: self-checking test of the pending accumulator reset.
// Steps h through integer and fractional values while a tag strobe arrives
// every 128 cycles, and checks that parst fires exactly once, in the cycle
// after the first strobe that follows each move to a new integer value, and
// never for a fractional h or a return to the same integer.
module tb_pa_reset_ctrl;
  logic        tclk = 1'b0, rst_n = 1'b0, tagstb = 1'b0;
  logic [15:0] h = 16'h0000;
  logic        pend_rst, parst;
  int checks = 0, failures = 0, parst_count = 0;
  int cyc = 0;
  int exp_parst_cycle = -1;   // cycle index at which parst must be seen
  int exp_count = 0;
  int pend_from = -1;       // first cycle with the reset pending

  always #9 tclk = ~tclk;

  pa_reset_ctrl dut (.tclk, .rst_n, .h, .tagstb, .pend_rst, .parst);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // h schedule: value applied from a given cycle; 'new' marks a new integer
  typedef struct { int at; logic [15:0] hv; bit is_new; } step_t;
  step_t steps [8] = '{
    '{at:  50, hv: 16'h2800, is_new: 1},   // 10.0
    '{at: 300, hv: 16'h2A00, is_new: 0},   // 10.5
    '{at: 420, hv: 16'h2800, is_new: 0},   // back to 10.0: same integer
    '{at: 700, hv: 16'h3000, is_new: 1},   // 12.0
    '{at: 760, hv: 16'h3001, is_new: 0},   // 12 + 1/1024
    '{at: 1000, hv: 16'h5000, is_new: 1},  // 20.0
    '{at: 1100, hv: 16'h2000, is_new: 1},  // 8.0 before the strobe: one reset
    '{at: 1500, hv: 16'h2000, is_new: 0}
  };

  function automatic bit strobe_at(int c);
    return (c % 128) == 17;
  endfunction

  function automatic int next_strobe(int c);
    for (int x = c + 1; x < c + 300; x++) if (strobe_at(x)) return x;
    return -1;
  endfunction

  always @(posedge tclk) if (rst_n) begin
    #1;
    checks += 2;
    // pend_rst is high from the edge after a new integer up to the strobe edge
    if (pend_rst !== (cyc >= pend_from && cyc < exp_parst_cycle)) begin
      failures++;
      $display("FAIL pend_rst=%b at cycle %0d", pend_rst, cyc);
    end
    if (parst) begin
      parst_count++;
      if (cyc != exp_parst_cycle) begin
        failures++;
        $display("FAIL parst at cycle %0d, expected %0d", cyc, exp_parst_cycle);
      end
    end else if (cyc == exp_parst_cycle) begin
      failures++;
      $display("FAIL parst missing at cycle %0d", cyc);
    end
  end

  initial begin
    repeat (3) @(posedge tclk);
    rst_n <= 1'b1;
    for (int c = 1; c < 1700; c++) begin
      @(posedge tclk);
      cyc = c;
      foreach (steps[i])
        if (steps[i].at == c) begin
          h <= steps[i].hv;
          if (steps[i].is_new) begin
            // the new integer is seen at edge c+1, strobes from edge c+2 on
            int s;
            s = next_strobe(c + 1);
            if (exp_parst_cycle < c) begin
              exp_count++;
              pend_from = c + 1;
            end
            exp_parst_cycle = s;
          end
        end
      tagstb <= strobe_at(c + 1);
    end
    checks++;
    if (parst_count != exp_count) begin
      failures++;
      $display("FAIL parst fired %0d times, expected %0d", parst_count, exp_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
