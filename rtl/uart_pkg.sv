// uart_pkg: types and constants shared by the UART transmitter, receiver and
// baud generator.
//
// The frame is the classic asynchronous one: a start bit (0), DATA_BITS data
// bits sent least significant bit first, an optional parity bit and one stop
// bit (1); the line idles at 1. Eight data bits and 16x receiver oversampling
// are the defaults of the design. The parity bit is optional and off by
// default; when it is enabled it is even parity (a choice of this design).
package uart_pkg;

  localparam int unsigned DEFAULT_DATA_BITS  = 8;
  localparam int unsigned DEFAULT_OVERSAMPLE = 16;
  localparam int unsigned DEFAULT_CPB_W      = 16;

  // Transmitter controller states.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,
    TX_START = 2'd1,
    TX_DATA  = 2'd2,
    TX_STOP  = 2'd3
  } tx_state_t;

  // Receiver controller states.
  typedef enum logic [1:0] {
    RX_IDLE  = 2'd0,
    RX_START = 2'd1,
    RX_DATA  = 2'd2,
    RX_STOP  = 2'd3
  } rx_state_t;

endpackage
