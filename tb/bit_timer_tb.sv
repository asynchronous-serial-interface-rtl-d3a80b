// bit_timer_tb: self-checking testbench for the bit-period strobe generator.
//
// Two instances with small clock/bit-rate pairs: 1000/100 (exact divide by
// 10) and 1050/100 (10.5, rounded to 11).  For each it checks that the first
// strobe comes DIV clocks after reset is released, that strobes are one clock
// wide and exactly DIV clocks apart, and that a reset in mid-period restarts
// the count.  The default 50 MHz / 9600 bit/s divisor (5208) is checked by
// the full-size top-level testbench.
module bit_timer_tb;

  logic clk = 1'b0;
  logic reset_n;
  logic nb10, nb11;

  int checks = 0, failures = 0;

  bit_timer #(.CLK_HZ(1000), .BAUD(100)) dut10 (.clk, .reset_n, .nextbit(nb10));
  bit_timer #(.CLK_HZ(1050), .BAUD(100)) dut11 (.clk, .reset_n, .nextbit(nb11));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clocks since reset release, and the clock numbers of each strobe.
  int cyc;
  int last10, last11, n10, n11;

  always @(negedge clk) begin
    if (!reset_n) begin
      cyc = 0; last10 = 0; last11 = 0; n10 = 0; n11 = 0;
    end else begin
      cyc++;
      if (nb10) begin
        checks++;
        if (cyc - last10 != 10) begin
          failures++;
          $display("FAIL DIV=10 strobe %0d after %0d clocks", n10, cyc - last10);
        end
        last10 = cyc; n10++;
      end
      if (nb11) begin
        checks++;
        if (cyc - last11 != 11) begin
          failures++;
          $display("FAIL DIV=11 strobe %0d after %0d clocks", n11, cyc - last11);
        end
        last11 = cyc; n11++;
      end
    end
  end

  initial begin
    reset_n = 1'b0;
    repeat (3) @(negedge clk);
    #1 reset_n = 1'b1;
    repeat (205) @(negedge clk);
    checks++;
    if (n10 != 20 || n11 != 18) begin
      failures++;
      $display("FAIL strobe counts %0d %0d, expected 20 18", n10, n11);
    end
    // Reset in mid-period restarts the count.
    repeat (4) @(negedge clk);
    #1 reset_n = 1'b0;
    @(negedge clk);
    #1 reset_n = 1'b1;
    repeat (100) @(negedge clk);
    #1;
    checks++;
    if (n10 != 10 || n11 != 9) begin
      failures++;
      $display("FAIL strobe counts after reset %0d %0d, expected 10 9", n10, n11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
