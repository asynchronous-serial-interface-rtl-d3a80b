// uart_pkg: types and constants shared by the serial transmitter and the
// blocks that drive it.
//
// The transmitter's state type is an enumeration over an unsigned integer
// base type, which is the form an FPGA/CPLD synthesis tool recognises as a
// finite-state machine (it then picks its own encoding, typically one-hot).
// The states are one idle state, the start bit, the eight data bits in the
// order they are sent (least-significant first) and the stop bit.
// The frame format (8 data bits, no parity, one stop bit, 9600 bit/s from a
// 50 MHz clock) follows the interface description; the package only names it.
package uart_pkg;

  // Frame format: 1 start bit, DATA_BITS data bits LSB first, 1 stop bit.
  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = DATA_BITS + 2;

  // Default clocking of the board and the line rate.
  localparam int unsigned CLK_HZ_DEFAULT = 50_000_000;
  localparam int unsigned BAUD_DEFAULT   = 9_600;

  // Transmitter states, in transmission order.
  typedef enum int unsigned {
    S_IDLE,
    S_START,
    S_D0, S_D1, S_D2, S_D3, S_D4, S_D5, S_D6, S_D7,
    S_STOP
  } tx_state_t;

endpackage
