// reset_debounce_tb: self-checking testbench for the reset debouncer.
//
// Uses a 20-clock debounce time.  Checks that the output starts in reset,
// that a clean level change appears after at least DEBOUNCE and at most
// DEBOUNCE+3 clocks (synchronizer and counter), that bursts of bounce pulses
// shorter than the debounce time never change the output -- even when their
// total length is many times the debounce time -- and that the output is a
// clean copy of the input once settled.
module reset_debounce_tb;

  localparam int unsigned DB = 20;

  logic clk = 1'b0;
  logic reset_n_in;
  logic reset_n;

  int checks = 0, failures = 0;

  reset_debounce #(.DEBOUNCE_CYCLES(DB)) dut (.clk, .reset_n_in, .reset_n);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_level(input logic exp, input string what);
    checks++;
    if (reset_n !== exp) begin
      failures++;
      $display("FAIL %s: reset_n=%b expected %b at %0t", what, reset_n, exp, $time);
    end
  endtask

  // Set the input to `lvl` and hold it; the output must follow within the
  // allowed window and not before.
  task automatic clean_change(input logic lvl);
    int n;
    @(negedge clk);
    reset_n_in = lvl;
    n = 0;
    while (reset_n !== lvl && n < int'(DB) + 10) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n < int'(DB) || n > int'(DB) + 3) begin
      failures++;
      $display("FAIL change to %b took %0d clocks", lvl, n);
    end
    repeat (5) begin
      @(negedge clk);
      expect_level(lvl, "settled");
    end
  endtask

  // Bounce: `pulses` excursions to the opposite level, each shorter than the
  // debounce time, separated by short returns; the output must not move.
  task automatic bounce(input logic stable, input int pulses);
    for (int p = 0; p < pulses; p++) begin
      int len = $urandom_range(1, DB - 4);
      reset_n_in = ~stable;
      repeat (len) begin
        @(negedge clk);
        expect_level(stable, "during bounce");
      end
      reset_n_in = stable;
      repeat ($urandom_range(1, 4)) begin
        @(negedge clk);
        expect_level(stable, "during bounce");
      end
    end
    repeat (DB + 5) begin
      @(negedge clk);
      expect_level(stable, "after bounce");
    end
  endtask

  initial begin
    reset_n_in = 1'b0;
    @(negedge clk);
    expect_level(1'b0, "power-up in reset");
    repeat (DB + 5) @(negedge clk);
    expect_level(1'b0, "button held");

    clean_change(1'b1);      // release
    bounce(1'b1, 30);        // bounces while released
    clean_change(1'b0);      // press
    bounce(1'b0, 30);        // bounces while pressed
    clean_change(1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
