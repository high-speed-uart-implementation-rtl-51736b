// tb_uart_rx: self-checking testbench for uart_rx.
//
// The testbench is the sender: it drives frames (start 0, eight data bits LSB
// first, optional even parity, stop 1) with a bit time of its own choosing and
// records the clock of each start bit. Two receivers listen, each with its own
// 16x baud_gen on a common divisor: one without parity on line0, one with
// parity on line1. A monitor logs every rx_dv. Checked: every byte arrives
// exactly once and in order, rx_dv comes 2 to 6 clocks after the receiver's
// own frame time (frame bits x divisor after the falling edge) or, for a
// faster sender cutting the stop bit short, after the sender's frame, the parity
// error flag is 0 for good frames and 1 for frames sent with a flipped parity
// bit, and long back-to-back streams are received at the nominal rate and
// with the sender 2% fast or slow, which only works if the receiver re-aligns
// on every start bit.
module tb_uart_rx;
  localparam int CPB_W = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CPB_W-1:0] cpb;
  logic             line0 = 1'b1, line1 = 1'b1;
  logic             tick0, tick1, sync0, sync1;
  logic             dv0, dv1, perr0, perr1;
  logic [7:0]       rb0, rb1;
  int               checks = 0, failures = 0;
  longint           cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  baud_gen #(.OVERSAMPLE(16), .CPB_W(CPB_W)) u_bg0 (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .sync(sync0), .tick(tick0));
  uart_rx #(.DATA_BITS(8), .OVERSAMPLE(16), .PARITY_EN(1'b0)) u_np (
    .clk(clk), .rst_n(rst_n), .os_tick(tick0), .baud_sync(sync0),
    .rx_serial(line0), .rx_dv(dv0), .rx_byte(rb0), .rx_parity_err(perr0));

  baud_gen #(.OVERSAMPLE(16), .CPB_W(CPB_W)) u_bg1 (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .sync(sync1), .tick(tick1));
  uart_rx #(.DATA_BITS(8), .OVERSAMPLE(16), .PARITY_EN(1'b1)) u_par (
    .clk(clk), .rst_n(rst_n), .os_tick(tick1), .baud_sync(sync1),
    .rx_serial(line1), .rx_dv(dv1), .rx_byte(rb1), .rx_parity_err(perr1));

  // Expected results, pushed by the sender, popped by the monitors.
  typedef struct {
    logic [7:0] data;
    bit         perr;
    longint     start;   // cycle count when the start bit was driven
    int         frame;   // receiver frame length in clocks
    int         tframe;  // sender frame length in clocks
  } exp_t;
  exp_t q0[$], q1[$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && dv0) begin
      check(q0.size() > 0, "np: unexpected rx_dv");
      if (q0.size() > 0) begin
        exp_t e;
        longint lat;
        e   = q0.pop_front();
        // The byte follows the receiver's stop bit, or the next start bit
        // when a faster sender's next frame cuts the stop bit short.
        lat = cycle - e.start - longint'(e.frame);
        if (!(lat >= 2 && lat <= 6) && e.tframe < e.frame)
          lat = cycle - e.start - longint'(e.tframe);
        check(rb0 == e.data, $sformatf("np: byte %02h expected %02h", rb0, e.data));
        check(!perr0, "np: parity flag without parity");
        check(lat >= 2 && lat <= 6, $sformatf("np: latency %0d", lat));
      end
    end
    if (rst_n && dv1) begin
      check(q1.size() > 0, "par: unexpected rx_dv");
      if (q1.size() > 0) begin
        exp_t e;
        longint lat;
        e   = q1.pop_front();
        // The byte follows the receiver's stop bit, or the next start bit
        // when a faster sender's next frame cuts the stop bit short.
        lat = cycle - e.start - longint'(e.frame);
        if (!(lat >= 2 && lat <= 6) && e.tframe < e.frame)
          lat = cycle - e.start - longint'(e.tframe);
        check(rb1 == e.data, $sformatf("par: byte %02h expected %02h", rb1, e.data));
        check(perr1 == e.perr, $sformatf("par: parity flag %0b expected %0b", perr1, e.perr));
        check(lat >= 2 && lat <= 6, $sformatf("par: latency %0d", lat));
      end
    end
  end

  task automatic drive(bit sel, logic b);
    if (sel) line1 = b; else line0 = b;
  endtask

  // One frame on line0 (sel=0) or line1 (sel=1), tx_div clocks per bit.
  task automatic send(bit sel, logic [7:0] d, int tx_div, bit bad_parity);
    exp_t e;
    logic [10:0] bits;
    int nb = sel ? 11 : 10;
    bits = sel ? {1'b1, (^d) ^ bad_parity, d, 1'b0} : {2'b11, d, 1'b0};
    e.data  = d;
    e.perr  = bad_parity;
    e.start = cycle;
    e.frame = nb * int'(cpb);
    e.tframe = nb * tx_div;
    if (sel) q1.push_back(e); else q0.push_back(e);
    for (int k = 0; k < nb; k++) begin
      drive(sel, bits[k]);
      repeat (tx_div) @(negedge clk);
    end
  endtask

  task automatic drain(int clocks);
    repeat (clocks) @(negedge clk);
    check(q0.size() == 0 && q1.size() == 0,
          $sformatf("frames not received: %0d/%0d", q0.size(), q1.size()));
    q0.delete(); q1.delete();
  endtask

  initial begin
    cpb = 16'd87;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // Single frames with idle gaps, 115200 baud at 10 MHz.
    send(1'b0, 8'hAB, 87, 1'b0);
    repeat (50) @(negedge clk);
    send(1'b1, 8'hAB, 87, 1'b0);
    repeat (50) @(negedge clk);
    send(1'b1, 8'h5C, 87, 1'b1);
    drain(40);
    // Back-to-back streams: nominal, sender 2% fast, sender 2% slow.
    for (int r = 0; r < 3; r++) begin
      int tx_div;
      tx_div = (r == 0) ? 87 : (r == 1) ? 85 : 89;
      fork
        for (int i = 0; i < 30; i++) send(1'b0, 8'($urandom), tx_div, 1'b0);
        for (int i = 0; i < 30; i++) send(1'b1, 8'($urandom), tx_div, i % 7 == 3);
      join
      drain(40);
    end
    // Other divisors, including the fastest (16 clocks per bit).
    for (int r = 0; r < 3; r++) begin
      int div;
      div = (r == 0) ? 16 : (r == 1) ? 23 : 200;
      cpb = CPB_W'(div);
      repeat (2) @(negedge clk);
      fork
        for (int i = 0; i < 10; i++) send(1'b0, 8'($urandom), div, 1'b0);
        for (int i = 0; i < 10; i++) send(1'b1, 8'($urandom), div, i == 4);
      join
      drain(40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
