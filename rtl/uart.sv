// uart: state-machine serial transmitter (the transmit half of a UART).
//
// A character is sent as a start bit (0), the eight bits of `chr` from the
// least-significant to the most-significant (1 = high, 0 = low), and a stop
// bit (1).  The line `txd` is high while idle.  The block does no bit timing
// of its own: the surrounding logic pulses `nextchr` to begin a character and
// `nextbit` once per bit period to move to the next bit.  `chr` is not
// stored; it must stay valid until the next character is started.
//
// Transitions, all on the rising edge of `clk`, in priority order:
//   reset_n low            -> idle (a character in progress is abandoned)
//   nextchr high           -> start bit, from any state
//   nextbit high           -> next bit of the frame; stop bit -> idle
//   otherwise              -> stay
// This is the transition table of the interface specification, including
// that `nextchr` wins over `nextbit` when both are pulsed in the same cycle
// (the normal case: the driver pulses them together).
//
// The state register, the next-state logic and the output logic are kept
// apart so synthesis extracts the state machine.  The state is never used
// directly as an output: `txd` is a register loaded from the next state, so it
// changes in the same clock edge as the state and is free of decode glitches.
// Registering `txd` is this design's choice.
//
// Interface: clk, reset_n (synchronous, active low), nextchr, nextbit (one
// clock wide), chr[7:0]; output txd.  An assertion checks that `chr` stays
// unchanged from the start bit through the last data bit.  Latency: txd shows the new bit one clock
// after the strobe that selects it.
module uart
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic       nextchr,
  input  logic       nextbit,
  input  logic [7:0] chr,
  output logic       txd
);

  tx_state_t state, state_next;

  // State register with synchronous reset.
  always_ff @(posedge clk) begin
    if (!reset_n) state <= S_IDLE;
    else          state <= state_next;
  end

  // Next-state logic.
  always_comb begin
    state_next = state;
    if (nextchr) begin
      state_next = S_START;
    end else if (nextbit) begin
      unique case (state)
        S_IDLE:  state_next = S_IDLE;
        S_START: state_next = S_D0;
        S_D0:    state_next = S_D1;
        S_D1:    state_next = S_D2;
        S_D2:    state_next = S_D3;
        S_D3:    state_next = S_D4;
        S_D4:    state_next = S_D5;
        S_D5:    state_next = S_D6;
        S_D6:    state_next = S_D7;
        S_D7:    state_next = S_STOP;
        S_STOP:  state_next = S_IDLE;
        default: state_next = S_IDLE;
      endcase
    end
  end

  // Output logic: the line level belonging to the state being entered.
  logic txd_next;
  always_comb begin
    unique case (state_next)
      S_START: txd_next = 1'b0;
      S_D0:    txd_next = chr[0];
      S_D1:    txd_next = chr[1];
      S_D2:    txd_next = chr[2];
      S_D3:    txd_next = chr[3];
      S_D4:    txd_next = chr[4];
      S_D5:    txd_next = chr[5];
      S_D6:    txd_next = chr[6];
      S_D7:    txd_next = chr[7];
      default: txd_next = 1'b1;    // idle and stop bit
    endcase
  end

  always_ff @(posedge clk) begin
    if (!reset_n) txd <= 1'b1;
    else          txd <= txd_next;
  end

  // Interface rule: `chr` is not stored, so the driver must hold it from the
  // start of a character until its last data bit has been sent, unless a new
  // character is started.
  a_chr_stable: assert property (@(posedge clk) disable iff (!reset_n)
                                 (state inside {[S_START:S_D7]}) && !nextchr
                                 |-> $stable(chr));

endmodule
