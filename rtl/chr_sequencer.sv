// chr_sequencer: feeds the transmitter a fixed text string, one character
// every frame, once after each reset.
//
// The string (by default the nine-character ID "A00123456") is a parameter
// packed first-character-leftmost, as a SystemVerilog string literal packs
// it.  The block counts `nextbit` strobes in frames of ten bit periods (start
// bit, eight data bits, stop bit).  On the strobe that opens a frame it raises
// `nextchr` in the same clock as `nextbit`, so the two strobes are aligned and
// one clock wide, as the transmitter's interface requires.  Characters are
// sent back to back: the strobe that would end a stop bit starts the next
// character.  After the last character no further `nextchr` is given; the
// transmitter then returns to idle and the line stays high until the next
// reset.
//
// `chr` shows the character being sent through its data bits, moves on to the
// next one on the strobe that enters the stop bit, and so is already valid when
// the next `nextchr` arrives and never changes while data bits are sent.
// Sending the string once per reset (the button restarts it) and the frame
// counting are this design's choices; the string, its length and the frame
// format are the interface's.
//
// Interface: clk, reset_n (synchronous, active low), nextbit (bit-period
// strobe in); outputs nextchr (one-clock strobe, combinational from nextbit),
// chr[7:0], done (the last character has reached its stop bit).
module chr_sequencer
  import uart_pkg::*;
#(
  parameter int unsigned        NCHARS = 9,
  parameter logic [8*NCHARS-1:0] TEXT  = "A00123456"
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       nextbit,
  output logic       nextchr,
  output logic [7:0] chr,
  output logic       done
);

  localparam int unsigned IW = $clog2(NCHARS + 1);
  localparam int unsigned BW = $clog2(FRAME_BITS);

  logic [IW-1:0] idx;     // character of the current frame (NCHARS = finished)
  logic [BW-1:0] bitpos;  // strobes seen in the current frame, 0..FRAME_BITS-1

  assign done    = (idx == IW'(NCHARS));
  assign nextchr = nextbit && !done && (bitpos == '0);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      idx    <= '0;
      bitpos <= '0;
    end else if (nextbit && !done) begin
      bitpos <= (bitpos == BW'(FRAME_BITS - 1)) ? '0 : bitpos + 1'b1;
      // The strobe that enters the stop bit moves on to the next character.
      if (bitpos == BW'(FRAME_BITS - 1)) idx <= idx + 1'b1;
    end
  end

  // Character of the current frame; the last one is held once finished.
  always_comb begin
    chr = TEXT[7:0];
    for (int unsigned k = 0; k < NCHARS; k++) begin
      if (idx == IW'(k)) chr = TEXT[8*(NCHARS-1-k) +: 8];
    end
  end

  // The transmitter's interface: a character start is always aligned with a
  // bit strobe.
  a_nextchr_aligned: assert property (@(posedge clk) disable iff (!reset_n)
                                      nextchr |-> nextbit);

endmodule
