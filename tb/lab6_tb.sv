// lab6_tb: end-to-end testbench of the serial ID transmitter at reduced
// timing (16 clocks per bit, 40-clock debounce) with the default
// nine-character string.
//
// A receiver model decodes `txd` and checks every bit edge against the bit
// period.  The test:
//   1. powers up with the button pressed and bouncing, then releases it
//      (with bounce); the string "A00123456" must arrive once, its first start
//      bit one bit period (+1 clock) after the debounced reset is released,
//      characters exactly ten bit periods apart, and the line must then stay
//      high;
//   2. bounces the button with pulses shorter than the debounce time while a
//      string is sent; the string must arrive intact;
//   3. presses the button in the middle of the fourth character; the
//      character in progress stops, the line goes high, and after release the
//      whole string is sent again.
// It counts each mechanism of the design and fails if one never happened:
// power-up reset, ignored bounce, back-to-back characters (nextchr in the
// stop bit), stop bit to idle, nextbit on an idle line, and a transmission
// halted by reset.
module lab6_tb;
  import uart_pkg::*;

  localparam int          BITCLK = 16;
  localparam int          DB     = 40;
  localparam string       EXPECT = "A00123456";

  logic   clk = 1'b0;
  logic   reset_n_in;
  logic   txd;
  longint cycle = 0;

  int checks = 0, failures = 0;

  lab6 #(.CLK_HZ(BITCLK * 100), .BAUD(100), .DEBOUNCE_CYCLES(DB)) dut (
    .clk, .reset_n_in, .txd
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Receiver model.
  logic       rx_valid, rx_flush = 1'b1;   // held until the design has seen a clock
  logic [7:0] rx_data;
  longint     rx_start;
  int         rx_ferr, rx_terr;
  serial_rx #(.BIT_CLKS(BITCLK)) rx (
    .clk, .rxd(txd), .flush(rx_flush), .cycle, .valid(rx_valid), .data(rx_data),
    .start_cycle(rx_start), .frame_errors(rx_ferr), .timing_errors(rx_terr)
  );

  // Received characters and the start cycle of each.
  byte    got[$];
  longint got_at[$];
  always @(posedge clk) if (rx_valid) begin
    got.push_back(rx_data);
    got_at.push_back(rx_start);
  end

  // Cycle at which the debounced reset was last released.
  longint release_cycle;
  always @(posedge clk) if (!dut.reset_n) release_cycle <= cycle + 1;

  // Mechanism counters, observed inside the design.
  int n_powerup = 0, n_bounce = 0, n_b2b = 0, n_stop_idle = 0, n_idle_bit = 0, n_halt = 0;
  logic reset_n_q = 1'b0;
  always @(posedge clk) begin
    reset_n_q <= dut.reset_n;
    if (dut.reset_n) begin
      if (dut.nextchr && dut.u_uart.state == S_STOP)                 n_b2b++;
      if (dut.nextbit && !dut.nextchr && dut.u_uart.state == S_STOP) n_stop_idle++;
      if (dut.nextbit && !dut.nextchr && dut.u_uart.state == S_IDLE) n_idle_bit++;
    end
    if (reset_n_q && !dut.reset_n && dut.u_uart.state != S_IDLE)      n_halt++;
  end

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
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Drive the button to `lvl` after a burst of short bounce pulses.
  task automatic button(input logic lvl);
    for (int i = 0; i < 5; i++) begin
      reset_n_in = lvl;
      repeat ($urandom_range(1, DB / 4)) @(negedge clk);
      reset_n_in = ~lvl;
      repeat ($urandom_range(1, DB / 4)) @(negedge clk);
    end
    reset_n_in = lvl;
  endtask

  // Wait for `n` characters and compare them with the start of EXPECT.
  task automatic expect_string(input int first, input int n);
    int waited = 0;
    while (got.size() < first + n && waited < 200 * BITCLK) begin
      @(negedge clk);
      waited++;
    end
    check(got.size() >= first + n, $sformatf("%0d characters received", got.size()));
    for (int i = 0; i < n && first + i < got.size(); i++) begin
      check(got[first+i] == EXPECT[i],
            $sformatf("char %0d: got %02h expected %02h", i, got[first+i], EXPECT[i]));
      if (i > 0)
        check(got_at[first+i] - got_at[first+i-1] == longint'(10 * BITCLK),
              $sformatf("char %0d spacing %0d", i, got_at[first+i] - got_at[first+i-1]));
    end
  endtask

  initial begin
    // 1. Power up with the button held, bounce, release.
    reset_n_in = 1'b0;
    repeat (3) @(negedge clk);
    rx_flush = 1'b0;
    check(dut.reset_n == 1'b0, "powers up in reset");
    check(txd == 1'b1, "line high in reset");
    n_powerup++;
    repeat (DB) @(negedge clk);
    button(1'b1);
    @(posedge dut.reset_n);
    n_bounce++;
    expect_string(0, 9);
    // Strobe register + txd register: the start bit begins DIV+1 clocks
    // after the debounced reset is released.
    check(got_at[0] - release_cycle == longint'(BITCLK) + 1,
          $sformatf("first start bit %0d clocks after reset", got_at[0] - release_cycle));
    repeat (30 * BITCLK) begin
      @(negedge clk);
      check(txd == 1'b1, "idle after string");
    end
    check(got.size() == 9, "nothing after the string");

    // 2. Bounce shorter than the debounce time during a string.
    button(1'b0);
    @(negedge dut.reset_n);
    button(1'b1);
    @(posedge dut.reset_n);
    repeat (25 * BITCLK) @(negedge clk);
    for (int i = 0; i < 6; i++) begin
      reset_n_in = 1'b0;
      repeat ($urandom_range(1, DB - 8)) @(negedge clk);
      reset_n_in = 1'b1;
      repeat ($urandom_range(1, 8)) @(negedge clk);
      check(dut.reset_n == 1'b1, "bounce ignored");
      n_bounce++;
    end
    expect_string(9, 9);
    repeat (15 * BITCLK) @(negedge clk);

    // 3. Press in the middle of the fourth character.
    button(1'b0);
    @(negedge dut.reset_n);
    button(1'b1);
    @(posedge dut.reset_n);
    wait (got.size() >= 18 + 3);
    repeat (BITCLK) @(negedge clk);
    reset_n_in = 1'b0;                  // clean press
    @(negedge dut.reset_n);
    check(dut.u_uart.state inside {S_D0, S_D1, S_D2, S_D3, S_D4, S_D5, S_D6},
          "button pressed mid-character");
    rx_flush = 1'b1;                    // the receiver drops the cut frame
    repeat (2) @(negedge clk);          // synchronous reset: next clock
    check(txd == 1'b1, "line high one clock after reset");
    rx_flush = 1'b0;
    check(got.size() == 18 + 3, $sformatf("%0d characters before the halt", got.size() - 18));
    repeat (30 * BITCLK) begin
      @(negedge clk);
      check(txd == 1'b1, "held in reset");
    end
    button(1'b1);
    @(posedge dut.reset_n);
    expect_string(21, 9);
    repeat (20 * BITCLK) @(negedge clk);

    check(rx_ferr == 0, $sformatf("%0d framing errors", rx_ferr));
    check(rx_terr == 0, $sformatf("%0d bit timing errors", rx_terr));
    check(n_powerup > 0, "power-up reset never happened");
    check(n_bounce > 0, "bounce never ignored");
    check(n_b2b > 0, "no back-to-back characters");
    check(n_stop_idle > 0, "stop bit never returned to idle");
    check(n_idle_bit > 0, "no nextbit on an idle line");
    check(n_halt > 0, "no transmission halted by reset");
    $display("mechanisms: power-up %0d, bounce ignored %0d, back-to-back %0d, stop->idle %0d, idle nextbit %0d, halted %0d",
             n_powerup, n_bounce, n_b2b, n_stop_idle, n_idle_bit, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
