// lab6_full_tb: full-size testbench of the serial ID transmitter with every
// parameter at its default: 50 MHz clock, 9600 bit/s (5208 clocks per bit),
// 10 ms (500 000-clock) reset debounce, string "A00123456".
//
// Powers up with the button pressed, releases it after a bouncy 2 ms, and
// decodes `txd` with a receiver model running at 5208 clocks per bit.  Checks
// the nine characters, their exact bit timing, their spacing of ten bit
// periods, the delay of the first start bit after the debounced release, the
// delay of the debouncer itself, and that the line then stays high.  About
// 1.2 million clocks.
module lab6_full_tb;

  localparam longint BITCLK = (50_000_000 + 4_800) / 9_600;   // 5208
  localparam longint DB     = 500_000;
  localparam string  EXPECT = "A00123456";

  logic   clk = 1'b0;
  logic   reset_n_in;
  logic   txd;
  longint cycle = 0;

  int checks = 0, failures = 0;

  lab6 dut (.clk, .reset_n_in, .txd);

  always #10 clk = ~clk;    // 50 MHz
  always @(posedge clk) cycle <= cycle + 1;

  logic       rx_valid;
  logic       rx_flush = 1'b1;   // held until the design has seen a clock
  logic [7:0] rx_data;
  longint     rx_start;
  int         rx_ferr, rx_terr;
  serial_rx #(.BIT_CLKS(int'(BITCLK))) rx (
    .clk, .rxd(txd), .flush(rx_flush), .cycle, .valid(rx_valid), .data(rx_data),
    .start_cycle(rx_start), .frame_errors(rx_ferr), .timing_errors(rx_terr)
  );

  byte    got[$];
  longint got_at[$];
  always @(posedge clk) if (rx_valid) begin
    got.push_back(rx_data);
    got_at.push_back(rx_start);
  end

  // Reset debounced output observed at the top's pins only through txd; the
  // release time is taken from the button and the known debounce delay.
  longint button_release;

  initial begin
    repeat (1_500_000) @(posedge clk);
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

  initial begin
    reset_n_in = 1'b0;
    repeat (3) @(negedge clk);
    rx_flush = 1'b0;
    repeat (1000) @(negedge clk);
    check(txd == 1'b1, "line high in reset");
    // 2 ms of contact bounce, each pulse far shorter than 10 ms.
    for (int i = 0; i < 20; i++) begin
      reset_n_in = 1'b1;
      repeat ($urandom_range(100, 5000)) @(negedge clk);
      reset_n_in = 1'b0;
      repeat ($urandom_range(100, 5000)) @(negedge clk);
    end
    reset_n_in = 1'b1;
    button_release = cycle;
    check(txd == 1'b1, "line high while bouncing");

    while (got.size() < 9 && cycle < button_release + DB + 100 * BITCLK) @(negedge clk);
    check(got.size() == 9, $sformatf("%0d characters received", got.size()));
    for (int i = 0; i < 9 && i < got.size(); i++) begin
      check(got[i] == EXPECT[i], $sformatf("char %0d: got %02h expected %02h", i, got[i], EXPECT[i]));
      if (i > 0)
        check(got_at[i] - got_at[i-1] == 10 * BITCLK,
              $sformatf("char %0d spacing %0d", i, got_at[i] - got_at[i-1]));
    end
    // Release -> debounced (2-flop sync + DB clocks) -> one bit period -> txd.
    if (got.size() > 0) begin
      longint d;
      d = got_at[0] - button_release;
      check(d >= DB + BITCLK && d <= DB + BITCLK + 6,
            $sformatf("first start bit %0d clocks after release", d));
    end
    repeat (int'(20 * BITCLK)) begin
      @(negedge clk);
      check(txd == 1'b1, "idle after string");
    end
    check(got.size() == 9, "nothing after the string");
    check(rx_ferr == 0, $sformatf("%0d framing errors", rx_ferr));
    check(rx_terr == 0, $sformatf("%0d bit timing errors", rx_terr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
