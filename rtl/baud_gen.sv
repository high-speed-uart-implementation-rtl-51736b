// baud_gen: clock-enable generator for the UART baud clocks.
//
// Produces OVERSAMPLE one-cycle `tick` pulses for every `clks_per_bit`
// system clocks, so a bit time is exactly clks_per_bit clocks on average for
// any divisor, integer multiple of OVERSAMPLE or not. It is a fractional
// (phase-accumulator) divider: every clock the accumulator grows by
// OVERSAMPLE; when it reaches clks_per_bit a tick is issued and clks_per_bit
// is subtracted. With OVERSAMPLE = 1 it is a plain prescaled counter that
// ticks once every clks_per_bit clocks, which is how the transmitter uses it.
// With OVERSAMPLE = 16 it is the receiver's 16x baud clock; successive ticks
// are then floor or ceil of clks_per_bit/16 clocks apart.
//
// `tick` is combinational from the accumulator (it is high in the cycle whose
// closing edge completes the count), so a user acting on it at a clock edge
// sees exactly clks_per_bit edges per bit. `sync` restarts the phase: the
// accumulator is cleared at that edge and the first tick is acted on
// ceil(clks_per_bit/OVERSAMPLE) edges later. tick does not depend on sync, so
// a user may derive sync from tick (the receiver does, at the end of a stop
// bit) without forming a loop; a tick in the sync cycle is still issued. The divisor
// is a run-time input so the baud rate can be changed; it must be at least
// OVERSAMPLE. Changing it while a frame is in flight is tolerated (the
// accumulator is clamped) but that frame's timing is then undefined.
//
// The divider structure is this design's choice; the source asks only for a
// prescaled clock divider and configurable baud rates.
module baud_gen #(
  parameter int unsigned OVERSAMPLE = uart_pkg::DEFAULT_OVERSAMPLE,
  parameter int unsigned CPB_W      = uart_pkg::DEFAULT_CPB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CPB_W-1:0] clks_per_bit,
  input  logic             sync,
  output logic             tick
);

  logic [CPB_W:0] acc;
  logic [CPB_W:0] sum;
  logic [CPB_W:0] rem;

  always_comb begin
    sum  = acc + (CPB_W+1)'(OVERSAMPLE);
    rem  = sum - {1'b0, clks_per_bit};
    tick = (sum >= {1'b0, clks_per_bit});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (sync) begin
      acc <= '0;
    end else if (tick) begin
      // Clamp if the divisor was lowered mid-count.
      acc <= (rem >= {1'b0, clks_per_bit}) ? '0 : rem;
    end else begin
      acc <= sum;
    end
  end

  // The divisor must leave at least one clock per tick.
  a_divisor_range: assert property (@(posedge clk) disable iff (!rst_n)
    clks_per_bit >= CPB_W'(OVERSAMPLE))
    else $error("baud_gen: clks_per_bit %0d below OVERSAMPLE %0d", clks_per_bit, OVERSAMPLE);

endmodule
