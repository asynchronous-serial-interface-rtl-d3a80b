// lab6: serial ID transmitter, the top level of the design.
//
// After each press of the reset button the board sends a fixed
// nine-character text string (an ID, "A00123456" by default) on `txd` as
// asynchronous serial data: 9600 bit/s, 8 data bits LSB first, no parity,
// 1 stop bit, line high when idle.  Characters follow each other without gaps
// and the line stays high after the last one.
//
// Four blocks, all clocked by the 50 MHz `clk`:
//   reset_debounce  raw button -> debounced synchronous reset_n
//   bit_timer       reset_n    -> nextbit, one strobe per bit period
//   chr_sequencer   nextbit    -> nextchr (aligned with nextbit) and chr
//   uart            state-machine transmitter driving txd
// The port list (clk, reset_n_in, txd) and the split into a transmitter and
// a control part that feeds it `nextchr`, `nextbit` and `chr` follow the
// interface description; how the control part is built is this design's own.
//
// Timing: a string takes 9 x 10 bit periods (about 9.4 ms); the first start
// bit begins one bit period after the debounced reset is released.  Holding
// the button stops a character in progress and returns txd high.
module lab6
  import uart_pkg::*;
#(
  parameter int unsigned         CLK_HZ          = CLK_HZ_DEFAULT,
  parameter int unsigned         BAUD            = BAUD_DEFAULT,
  parameter int unsigned         DEBOUNCE_CYCLES = 500_000,
  parameter int unsigned         NCHARS          = 9,
  parameter logic [8*NCHARS-1:0] TEXT            = "A00123456"
) (
  input  logic clk,
  input  logic reset_n_in,
  output logic txd
);

  logic       reset_n;
  logic       nextbit;
  logic       nextchr;
  logic [7:0] chr;
  logic       done;

  reset_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_reset (
    .clk        (clk),
    .reset_n_in (reset_n_in),
    .reset_n    (reset_n)
  );

  bit_timer #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_timer (
    .clk     (clk),
    .reset_n (reset_n),
    .nextbit (nextbit)
  );

  chr_sequencer #(.NCHARS(NCHARS), .TEXT(TEXT)) u_seq (
    .clk     (clk),
    .reset_n (reset_n),
    .nextbit (nextbit),
    .nextchr (nextchr),
    .chr     (chr),
    .done    (done)
  );

  uart u_uart (
    .clk     (clk),
    .reset_n (reset_n),
    .nextchr (nextchr),
    .nextbit (nextbit),
    .chr     (chr),
    .txd     (txd)
  );

endmodule
