// uart_top: a complete UART, transmitter and receiver side by side.
//
// Three blocks make the UART: the transmitter (uart_tx, with its own
// prescaled bit counter), the receiver (uart_rx) and the receiver's baud rate
// generator (baud_gen with OVERSAMPLE ticks per bit, restarted by the
// receiver at every start bit). Both sides share one run-time baud divisor,
// clks_per_bit, so the baud rate is fclk / clks_per_bit and can be changed
// while both sides are idle; 87 gives 115200 baud from 10 MHz. It must be at
// least OVERSAMPLE, so the highest bit rate is fclk / OVERSAMPLE.
//
// Transmit: pulse tx_dv with tx_byte while tx_active is low; tx_done pulses
// when the stop bit ends. Receive: rx_dv pulses with rx_byte (and
// rx_parity_err) about three clocks after the end of each frame on rx_serial.
// Frames are 1 start bit, DATA_BITS data bits LSB first, an even parity bit
// when PARITY_EN = 1, and 1 stop bit. The two serial lines are independent;
// tie tx_serial to rx_serial for a loopback.
//
// The partition into three blocks, the 8-bit frame and 16x oversampling follow
// the source; the shared run-time divisor and the parity option are this
// design's choices.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = DEFAULT_DATA_BITS,
  parameter int unsigned OVERSAMPLE = DEFAULT_OVERSAMPLE,
  parameter bit          PARITY_EN  = 1'b0,
  parameter int unsigned CPB_W      = DEFAULT_CPB_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CPB_W-1:0]     clks_per_bit,
  // transmitter
  input  logic                 tx_dv,
  input  logic [DATA_BITS-1:0] tx_byte,
  output logic                 tx_serial,
  output logic                 tx_active,
  output logic                 tx_done,
  // receiver
  input  logic                 rx_serial,
  output logic                 rx_dv,
  output logic [DATA_BITS-1:0] rx_byte,
  output logic                 rx_parity_err
);

  logic os_tick;
  logic baud_sync;

  uart_tx #(
    .DATA_BITS (DATA_BITS),
    .PARITY_EN (PARITY_EN),
    .CPB_W     (CPB_W)
  ) u_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .clks_per_bit (clks_per_bit),
    .tx_dv        (tx_dv),
    .tx_byte      (tx_byte),
    .tx_serial    (tx_serial),
    .tx_active    (tx_active),
    .tx_done      (tx_done)
  );

  baud_gen #(
    .OVERSAMPLE (OVERSAMPLE),
    .CPB_W      (CPB_W)
  ) u_rx_baud (
    .clk          (clk),
    .rst_n        (rst_n),
    .clks_per_bit (clks_per_bit),
    .sync         (baud_sync),
    .tick         (os_tick)
  );

  uart_rx #(
    .DATA_BITS  (DATA_BITS),
    .OVERSAMPLE (OVERSAMPLE),
    .PARITY_EN  (PARITY_EN)
  ) u_rx (
    .clk           (clk),
    .rst_n         (rst_n),
    .os_tick       (os_tick),
    .baud_sync     (baud_sync),
    .rx_serial     (rx_serial),
    .rx_dv         (rx_dv),
    .rx_byte       (rx_byte),
    .rx_parity_err (rx_parity_err)
  );

endmodule
