// uart_tb: self-checking testbench for the serial transmitter.
//
// Drives `nextchr`/`nextbit` as one-clock strobes with a short bit period
// (BITCLK clocks) and checks `txd` on every clock against the frame expected
// from the character: start bit 0, data LSB first, stop bit 1, idle 1.  Each
// strobe must show its bit on `txd` exactly one clock later and hold it until
// the next strobe.  Covered: back-to-back characters (nextchr on the strobe
// that ends the stop bit), gaps on an idle line, nextbit while idle, a
// restart by nextchr in the middle of a character, nextchr without nextbit,
// and a synchronous reset in the middle of a character.
module uart_tb;
  import uart_pkg::*;

  localparam int BITCLK = 4;

  logic       clk = 1'b0;
  logic       reset_n;
  logic       nextchr, nextbit;
  logic [7:0] chr;
  logic       txd;

  int checks = 0, failures = 0;

  uart dut (.clk, .reset_n, .nextchr, .nextbit, .chr, .txd);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_txd(input logic exp, input string what);
    checks++;
    if (txd !== exp) begin
      failures++;
      $display("FAIL %s: txd=%b expected %b at %0t", what, txd, exp, $time);
    end
  endtask

  // One strobe, then BITCLK clocks on which txd must hold `exp`.
  // A non-negative `newchr` is put on `chr` in the same clock as the strobe.
  task automatic strobe(input logic c, input logic b, input logic exp,
                        input string what, input int newchr = -1);
    @(negedge clk);
    if (newchr >= 0) chr = 8'(newchr);
    nextchr = c;
    nextbit = b;
    @(negedge clk);
    nextchr = 1'b0;
    nextbit = 1'b0;
    check_txd(exp, what);
    repeat (BITCLK - 1) begin
      @(negedge clk);
      check_txd(exp, what);
    end
  endtask

  // Expected line level of frame position p (0 = start, 1..8 data, 9 stop).
  function automatic logic frame_bit(input logic [7:0] c, input int p);
    if (p == 0) return 1'b0;
    if (p == 9) return 1'b1;
    return c[p-1];
  endfunction

  task automatic send_char(input logic [7:0] c);
    strobe(1'b1, 1'b1, 1'b0, "start bit", int'(c));
    for (int p = 1; p < 10; p++) begin
      strobe(1'b0, 1'b1, frame_bit(c, p), $sformatf("bit %0d of %02h", p, c));
    end
  endtask

  initial begin
    reset_n = 1'b0;
    nextchr = 1'b0;
    nextbit = 1'b0;
    chr     = 8'h00;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check_txd(1'b1, "idle in reset");
    reset_n = 1'b1;

    // nextbit on an idle line keeps it high.
    strobe(1'b0, 1'b1, 1'b1, "idle nextbit");
    strobe(1'b0, 1'b1, 1'b1, "idle nextbit");

    // The example character 'A' = 0x41: 0 1000 0010 1.
    send_char(8'h41);
    // Back to back characters, then a random mix with idle gaps.
    send_char(8'h30);
    send_char(8'hFF);
    send_char(8'h00);
    for (int n = 0; n < 30; n++) begin
      send_char(8'($urandom));
      if ($urandom_range(0, 2) == 0) strobe(1'b0, 1'b1, 1'b1, "stop -> idle");
      if ($urandom_range(0, 2) == 0) strobe(1'b0, 1'b1, 1'b1, "idle gap");
    end
    // After the last stop bit a bare nextbit returns to idle.
    strobe(1'b0, 1'b1, 1'b1, "stop -> idle");

    // Restart in the middle of a character: nextchr wins over nextbit.
    strobe(1'b1, 1'b1, 1'b0, "start bit", 'hA5);
    for (int p = 1; p <= 4; p++) strobe(1'b0, 1'b1, frame_bit(8'hA5, p), "partial");
    send_char(8'h5A);

    // nextchr alone (without nextbit) also starts a character.
    strobe(1'b1, 1'b0, 1'b0, "start on nextchr alone", 'h96);
    for (int p = 1; p < 10; p++) strobe(1'b0, 1'b1, frame_bit(8'h96, p), "after lone nextchr");

    // Reset in the middle of a character: line high at once and stays idle.
    strobe(1'b1, 1'b1, 1'b0, "start bit", 'h00);
    strobe(1'b0, 1'b1, 1'b0, "bit 0 of 00");
    @(negedge clk);
    reset_n = 1'b0;
    @(negedge clk);
    check_txd(1'b1, "high after reset");
    reset_n = 1'b1;
    for (int p = 0; p < 10; p++) strobe(1'b0, 1'b1, 1'b1, "idle after reset");
    // And it sends normally afterwards.
    send_char(8'h3C);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
