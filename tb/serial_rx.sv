// serial_rx: testbench-only receiver that decodes an 8N1 serial line the way
// a logic analyser's UART decoder does, and checks its timing exactly.
//
// A falling edge on an idle line starts a frame.  The line is sampled in the
// middle of each bit (BIT_CLKS/2 clocks after the bit's start): the start bit
// must read 0, eight data bits follow LSB first, and the stop bit must read 1,
// otherwise a framing error is counted.  Within a frame every change of the
// line must fall on a whole multiple of BIT_CLKS clocks after the start edge;
// any other change counts as a timing error.  Each good character is shown on
// `data` with a one-clock `valid`.  `flush` abandons a frame in progress.
// `start_cycle` is the clock count (from `cycle`) of the last start edge.
module serial_rx #(
  parameter int BIT_CLKS = 16
) (
  input  logic       clk,
  input  logic       rxd,
  input  logic       flush,
  input  longint     cycle,
  output logic       valid,
  output logic [7:0] data,
  output longint     start_cycle,
  output int         frame_errors,
  output int         timing_errors
);

  int         since;        // clocks since the start edge, -1 when idle
  logic       prev = 1'b1;
  logic [7:0] shift;

  initial begin
    since         = -1;
    valid         = 1'b0;
    data          = 8'h00;
    start_cycle   = 0;
    frame_errors  = 0;
    timing_errors = 0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    prev  <= rxd;
    if (flush) begin
      since <= -1;
    end else if (since < 0) begin
      if (prev && !rxd) begin
        since       <= 1;
        start_cycle <= cycle;
      end
    end else begin
      if (rxd != prev && since % BIT_CLKS != 0) timing_errors <= timing_errors + 1;
      if (since % BIT_CLKS == BIT_CLKS / 2) begin
        automatic int k = since / BIT_CLKS;
        if (k == 0 && rxd != 1'b0) begin
          frame_errors <= frame_errors + 1;
          since <= -1;
        end else if (k >= 1 && k <= 8) begin
          shift <= {rxd, shift[7:1]};
          since <= since + 1;
        end else if (k == 9) begin
          if (rxd) begin
            valid <= 1'b1;
            data  <= shift;
          end else begin
            frame_errors <= frame_errors + 1;
          end
          since <= -1;
        end else begin
          since <= since + 1;
        end
      end else begin
        since <= since + 1;
      end
    end
  end

endmodule
