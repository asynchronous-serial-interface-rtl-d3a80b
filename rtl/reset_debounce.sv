// reset_debounce: turns the raw pushbutton reset input into a clean,
// synchronous, active-low reset for the rest of the design.
//
// The asynchronous button level is first passed through a two-flop
// synchroniser.  A counter then measures how long the synchronised level has
// differed from the current output; only when it has differed for
// DEBOUNCE_CYCLES consecutive clocks is the output changed.  Contact bounce
// shorter than that restarts the count and is ignored.  Both edges are
// filtered the same way, so a press and a release each take DEBOUNCE_CYCLES
// (+2 for synchronisation) clocks to appear on `reset_n`.
//
// The registers power up with reset asserted (declaration initial values,
// which CPLD and FPGA flows load at configuration), so the design starts in
// reset and leaves it only after the button has been seen released for the
// full debounce time.
//
// The interface names only a "debounced reset signal"; the synchroniser, the
// counting scheme and the 10 ms default (500 000 cycles of 50 MHz) are this
// design's choices.
//
// Interface: clk, reset_n_in (raw, active low, asynchronous);
// output reset_n (debounced, synchronous to clk, active low).
module reset_debounce #(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000
) (
  input  logic clk,
  input  logic reset_n_in,
  output logic reset_n
);

  localparam int unsigned CW = (DEBOUNCE_CYCLES > 1) ? $clog2(DEBOUNCE_CYCLES) : 1;

  logic [1:0]    sync    = 2'b00;
  logic [CW-1:0] count   = '0;
  logic          level   = 1'b0;

  always_ff @(posedge clk) begin
    sync <= {sync[0], reset_n_in};
  end

  always_ff @(posedge clk) begin
    if (sync[1] == level) begin
      count <= '0;
    end else if (count == CW'(DEBOUNCE_CYCLES - 1)) begin
      count <= '0;
      level <= sync[1];
    end else begin
      count <= count + 1'b1;
    end
  end

  assign reset_n = level;

endmodule
