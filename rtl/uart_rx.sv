// uart_rx: UART receiver with 16x oversampling.
//
// Recovers frames of a start bit, DATA_BITS data bits (least significant bit
// first), an optional even parity bit and a stop bit from the asynchronous
// line rx_serial. The line first passes a two-flop synchronizer. A four-state
// controller then runs on the baud clock enable os_tick, which comes from a
// baud_gen giving OVERSAMPLE ticks per bit:
//   * RX_IDLE: waits for the start bit, seen as the synchronized line at 0
//     while idle (the line idles at 1, so this is its falling transition).
//     On detection it pulses baud_sync, which restarts the baud generator's
//     phase, so tick k falls k/OVERSAMPLE bit times after the falling edge.
//   * RX_START: waits OVERSAMPLE ticks (one bit time), then RX_DATA.
//   * RX_DATA: counts OVERSAMPLE ticks per bit (state_count); at tick
//     OVERSAMPLE/2, the bit centre, it samples the line into the shift
//     register; after DATA_BITS (+1 with parity) bits it goes to RX_STOP.
//   * RX_STOP: samples the stop bit at its centre and times it for
//     OVERSAMPLE ticks, then presents the byte and returns to RX_IDLE. If the
//     line falls to 0 after a stop bit that was sampled at 1, the next frame's
//     start bit has begun (back-to-back frames from a sender a little faster
//     than this receiver): the stop state ends at once, the byte is presented
//     and the controller goes straight to RX_START, restarting the baud phase.
//     The same happens if the line is 0 at the end of the stop bit. Without
//     this, the receiver would fall behind a fast sender by the rate
//     difference on every frame of a continuous stream.
//
// Interface and timing: rx_dv is a one-cycle pulse at the end of the stop bit,
// about (DATA_BITS + PARITY_EN + 2) bit times plus three clocks after the
// falling edge of the start bit; rx_byte holds the byte until the next one and
// rx_parity_err is valid with it (always 0 without parity). The stop bit's
// value is not checked: there is no framing-error output.
//
// The states, the sixteen-tick bit time and centre sampling follow the source.
// The synchronizer, the level start detection, the phase restart of the baud
// generator, the parity option and the reset are this design's choices.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = DEFAULT_DATA_BITS,
  parameter int unsigned OVERSAMPLE = DEFAULT_OVERSAMPLE,
  parameter bit          PARITY_EN  = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 os_tick,
  output logic                 baud_sync,
  input  logic                 rx_serial,
  output logic                 rx_dv,
  output logic [DATA_BITS-1:0] rx_byte,
  output logic                 rx_parity_err
);

  localparam int unsigned NBITS = DATA_BITS + (PARITY_EN ? 1 : 0);
  localparam int unsigned BCW   = $clog2(NBITS + 1);
  localparam int unsigned SCW   = $clog2(OVERSAMPLE);
  localparam logic [SCW-1:0] LAST_TICK   = SCW'(OVERSAMPLE - 1);
  localparam logic [SCW-1:0] SAMPLE_TICK = SCW'(OVERSAMPLE / 2 - 1);

  rx_state_t        state;
  logic             rx_meta, rx_sync;
  logic [SCW-1:0]   state_count;
  logic [BCW-1:0]   bit_count;
  logic [NBITS-1:0] shreg;
  logic             bit_end, sample;
  logic             stop_ok;     // stop bit sampled at 1
  logic             stop_done;   // leave RX_STOP this cycle

  // Two-flop synchronizer for the asynchronous line.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_sync <= 1'b1;
    end else begin
      rx_meta <= rx_serial;
      rx_sync <= rx_meta;
    end
  end

  assign bit_end   = os_tick && (state_count == LAST_TICK);
  assign stop_done = (state == RX_STOP) && (bit_end || (stop_ok && !rx_sync));
  assign baud_sync = !rx_sync && ((state == RX_IDLE) || stop_done);
  assign sample    = os_tick && (state_count == SAMPLE_TICK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= RX_IDLE;
      state_count   <= '0;
      bit_count     <= '0;
      shreg         <= '0;
      stop_ok       <= 1'b0;
      rx_dv         <= 1'b0;
      rx_byte       <= '0;
      rx_parity_err <= 1'b0;
    end else begin
      rx_dv <= 1'b0;
      if (state != RX_IDLE && os_tick) begin
        state_count <= (state_count == LAST_TICK) ? '0 : state_count + 1'b1;
      end
      if (baud_sync) state_count <= '0;
      unique case (state)
        RX_IDLE: begin
          state_count <= '0;
          if (!rx_sync) state <= RX_START;
        end
        RX_START: begin
          if (bit_end) begin
            bit_count <= '0;
            state     <= RX_DATA;
          end
        end
        RX_DATA: begin
          if (sample) shreg <= {rx_sync, shreg[NBITS-1:1]};
          if (bit_end) begin
            if (bit_count == BCW'(NBITS - 1)) begin
              stop_ok <= 1'b0;
              state   <= RX_STOP;
            end else begin
              bit_count <= bit_count + 1'b1;
            end
          end
        end
        RX_STOP: begin
          if (sample) stop_ok <= rx_sync;
          if (stop_done) begin
            rx_dv         <= 1'b1;
            rx_byte       <= shreg[DATA_BITS-1:0];
            rx_parity_err <= PARITY_EN ? ^shreg : 1'b0;
            state         <= rx_sync ? RX_IDLE : RX_START;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
