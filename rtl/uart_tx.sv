// uart_tx: UART transmitter.
//
// Sends tx_byte as one asynchronous frame: a start bit (0), DATA_BITS data
// bits least significant bit first, an even parity bit when PARITY_EN is set,
// and one stop bit (1). It is built from the three parts the design calls for:
//   * a prescaled counter (baud_gen with OVERSAMPLE = 1) that raises the bit
//     enable `clk_en` once every clks_per_bit clocks; it is restarted when a
//     frame is accepted, so every bit is exactly clks_per_bit clocks long;
//   * a (DATA_BITS+1)-bit shift register, nine bits for the default byte,
//     loaded with {data, start bit}; its bit 0 drives tx_serial directly, so
//     the line is glitch-free. Each clk_en shifts it right; ones are shifted in
//     (the stop bit and idle level), except that the first bit shifted in is
//     the parity bit when parity is enabled, which thus follows the last data
//     bit out;
//   * a four-state controller IDLE -> START -> DATA -> STOP -> IDLE. IDLE
//     leaves on tx_dv (called tx_en in the state diagram), the others on
//     clk_en; DATA stays for DATA_BITS (+1 with parity) bit times.
//
// Interface and timing: tx_dv is sampled in IDLE only (a request while busy is
// ignored). The start bit appears on tx_serial the cycle after tx_dv, a frame
// takes (DATA_BITS + PARITY_EN + 2) * clks_per_bit clocks, and tx_done pulses
// for one cycle as the stop bit ends, together with the return to IDLE; a new
// tx_dv in that same cycle starts the next frame back to back. tx_active is
// high from the cycle after tx_dv until tx_done.
//
// The states, the nine-bit shift register and the prescaled counter follow
// the source; the parity option and its even polarity, the handshake and the
// asynchronous active-low reset are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS = DEFAULT_DATA_BITS,
  parameter bit          PARITY_EN = 1'b0,
  parameter int unsigned CPB_W     = DEFAULT_CPB_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CPB_W-1:0]     clks_per_bit,
  input  logic                 tx_dv,
  input  logic [DATA_BITS-1:0] tx_byte,
  output logic                 tx_serial,
  output logic                 tx_active,
  output logic                 tx_done
);

  localparam int unsigned NBITS = DATA_BITS + (PARITY_EN ? 1 : 0);
  localparam int unsigned BCW   = $clog2(NBITS + 1);

  tx_state_t            state;
  logic [DATA_BITS:0]   shreg;
  logic [BCW-1:0]       bit_count;
  logic                 parity;
  logic                 accept;
  logic                 clk_en;

  assign accept = (state == TX_IDLE) && tx_dv;

  // Prescaled counter: one enable per bit time, restarted at each frame.
  baud_gen #(
    .OVERSAMPLE (1),
    .CPB_W      (CPB_W)
  ) u_prescaler (
    .clk          (clk),
    .rst_n        (rst_n),
    .clks_per_bit (clks_per_bit),
    .sync         (accept),
    .tick         (clk_en)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TX_IDLE;
      shreg     <= '1;
      bit_count <= '0;
      parity    <= 1'b0;
      tx_done   <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        TX_IDLE: begin
          if (tx_dv) begin
            shreg     <= {tx_byte, 1'b0};
            parity    <= ^tx_byte;
            bit_count <= '0;
            state     <= TX_START;
          end
        end
        TX_START: begin
          if (clk_en) begin
            shreg <= {(PARITY_EN ? parity : 1'b1), shreg[DATA_BITS:1]};
            state <= TX_DATA;
          end
        end
        TX_DATA: begin
          if (clk_en) begin
            shreg <= {1'b1, shreg[DATA_BITS:1]};
            if (bit_count == BCW'(NBITS - 1)) begin
              state <= TX_STOP;
            end else begin
              bit_count <= bit_count + 1'b1;
            end
          end
        end
        TX_STOP: begin
          if (clk_en) begin
            tx_done <= 1'b1;
            state   <= TX_IDLE;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign tx_serial = shreg[0];
  assign tx_active = (state != TX_IDLE);

  // The line must be at the stop/idle level outside a frame.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n)
    (state == TX_IDLE) |-> tx_serial);

endmodule
