// bit_timer: produces the `nextbit` strobe, one clock wide, once per bit
// period of the serial line.
//
// A counter runs from 0 to DIV-1 and wraps; the strobe is a register set on
// the wrap, so it is high for exactly one clock every DIV clocks.  DIV is the
// clock frequency divided by the bit rate, rounded to the nearest integer:
// 50 MHz / 9600 bit/s gives 5208 clocks (9600.6 bit/s, 0.006 % fast, well
// inside what a UART receiver tolerates).  The 50 MHz clock and the 9600 bit/s
// rate are the interface's; dividing with one wrapping counter is this
// design's choice.
//
// Interface: clk, reset_n (synchronous, active low); output nextbit.
// Timing: after reset is released the first strobe comes DIV clocks later,
// then every DIV clocks.
module bit_timer #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9_600
) (
  input  logic clk,
  input  logic reset_n,
  output logic nextbit
);

  localparam int unsigned DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;
  logic          wrap;

  assign wrap = (count == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      count   <= '0;
      nextbit <= 1'b0;
    end else begin
      count   <= wrap ? '0 : count + 1'b1;
      nextbit <= wrap;
    end
  end

endmodule
