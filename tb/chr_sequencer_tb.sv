// chr_sequencer_tb: self-checking testbench for the character sequencer,
// with its default nine-character string "A00123456".
//
// Bit strobes are driven every few clocks (the sequencer does no timing of
// its own).  The testbench counts strobes and checks that nextchr comes only
// together with a strobe, exactly on strobes 0, 10, 20, ... 80 after reset,
// that chr then holds the expected character and stays unchanged through that
// character's data bits, that `done` rises after the ninth character and no
// further nextchr follows, and that a reset in mid-string starts again from
// the first character.
module chr_sequencer_tb;

  localparam string EXPECT = "A00123456";

  logic       clk = 1'b0;
  logic       reset_n;
  logic       nextbit;
  logic       nextchr;
  logic [7:0] chr;
  logic       done;

  int checks = 0, failures = 0;

  chr_sequencer dut (.clk, .reset_n, .nextbit, .nextchr, .chr, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Give `n` strobes, checking outputs at each; `k0` is the strobe count
  // since reset when the call starts.
  task automatic run_strobes(input int k0, input int n);
    for (int k = k0; k < k0 + n; k++) begin
      int ch = k / 10;
      int pos = k % 10;
      @(negedge clk);
      nextbit = 1'b1;
      #1;
      check(nextchr == (pos == 0 && ch < 9), $sformatf("nextchr at strobe %0d", k));
      // chr must be right from the nextchr strobe through the last data bit.
      if (ch < 9 && pos <= 8)
        check(chr == 8'(EXPECT[ch]), $sformatf("chr %02h at strobe %0d", chr, k));
      check(done == (ch >= 9), $sformatf("done at strobe %0d", k));
      @(negedge clk);
      nextbit = 1'b0;
      repeat ($urandom_range(1, 3)) begin
        #1;
        check(!nextchr, "nextchr without nextbit");
        @(negedge clk);
      end
    end
  endtask

  initial begin
    reset_n = 1'b0;
    nextbit = 1'b0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    run_strobes(0, 110);        // the whole string and some idle strobes

    // Reset halfway through the fourth character: starts again at 'A'.
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    run_strobes(0, 35);
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    run_strobes(0, 95);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
