// tb_uart_top: end-to-end testbench for uart_top.
//
// Two UARTs are wired as loopbacks (tx_serial to rx_serial): u_dut with the
// default parameters and u_par with the parity bit enabled. The parity
// UART's receive line can be switched to a testbench-driven line to inject
// frames with a wrong parity bit, and bursts from a sender about 2.5% faster
// than the receiver. A scoreboard records every byte the
// transmitter accepts and checks that the receiver returns the same bytes in
// order, that the parity flag is right, that each frame from accept to
// tx_done takes exactly (bits per frame) x clks_per_bit clocks and that every
// byte arrives within a few clocks of the end of its frame.
//
// Mechanisms exercised and counted (each must happen at least once):
//   baud rate switches (divisors 87, 16, 40 and 1000), back-to-back frames
//   (a new tx_dv in the tx_done cycle), requests ignored while busy, parity
//   errors detected, frames received at the fastest rate (16 clocks per bit),
//   stop bits cut short by a fast sender's next start bit.
module tb_uart_top;
  localparam int CPB_W = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CPB_W-1:0] cpb;
  int               checks = 0, failures = 0;
  longint           cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Default UART, loopback.
  logic       dv [2];
  logic [7:0] tb_byte [2];
  logic       ser [2], act [2], done [2], rdv [2], perr [2];
  logic [7:0] rbyte [2];
  logic       inj_sel = 1'b0, inj_line = 1'b1;
  logic       par_rx_line;

  uart_top u_dut (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb),
    .tx_dv(dv[0]), .tx_byte(tb_byte[0]), .tx_serial(ser[0]), .tx_active(act[0]),
    .tx_done(done[0]), .rx_serial(ser[0]), .rx_dv(rdv[0]), .rx_byte(rbyte[0]),
    .rx_parity_err(perr[0]));

  assign par_rx_line = inj_sel ? inj_line : ser[1];

  uart_top #(.PARITY_EN(1'b1)) u_par (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb),
    .tx_dv(dv[1]), .tx_byte(tb_byte[1]), .tx_serial(ser[1]), .tx_active(act[1]),
    .tx_done(done[1]), .rx_serial(par_rx_line), .rx_dv(rdv[1]), .rx_byte(rbyte[1]),
    .rx_parity_err(perr[1]));

  typedef struct {
    logic [7:0] data;
    bit         perr;
    longint     accept;
    int         tframe;   // sender's frame length in clocks
  } exp_t;
  exp_t q [2][$];

  int n_switch = 0, n_b2b = 0, n_busy_ignored = 0, n_perr = 0, n_fast = 0, n_early = 0;
  int n_rx [2] = '{0, 0};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int frame_bits(int u);
    return (u == 1) ? 11 : 10;
  endfunction

  // Receive monitors.
  for (genvar u = 0; u < 2; u++) begin : g_mon
    always @(negedge clk) begin
      if (rst_n && rdv[u]) begin
        check(q[u].size() > 0, $sformatf("u%0d: unexpected rx_dv", u));
        if (q[u].size() > 0) begin
          exp_t   e;
          longint lat;
          e   = q[u].pop_front();
          lat = cycle - e.accept - longint'(frame_bits(u) * int'(cpb));
          // A faster sender's next start bit ends the stop bit early.
          if (lat < 0) lat = cycle - e.accept - longint'(e.tframe);
          check(rbyte[u] == e.data, $sformatf("u%0d: byte %02h expected %02h", u, rbyte[u], e.data));
          check(perr[u] == e.perr, $sformatf("u%0d: parity flag %0b", u, perr[u]));
          check(lat >= 0 && lat <= 6, $sformatf("u%0d: rx latency %0d", u, lat));
          n_rx[u]++;
          if (e.perr) n_perr++;
          if (cpb == CPB_W'(16)) n_fast++;
        end
      end
    end
  end

  // Sends n bytes on UART u, back to back: each next tx_dv is raised in the
  // cycle tx_done is high. Halfway through each frame a second request with a
  // different byte is made, which must be ignored.
  task automatic burst(int u, int n);
    longint t0;
    for (int i = 0; i < n; i++) begin
      exp_t e;
      e.data = 8'($urandom);
      e.perr = 1'b0;
      e.tframe = frame_bits(u) * int'(cpb);
      tb_byte[u] = e.data;
      dv[u] = 1'b1;
      check(!act[u], $sformatf("u%0d: busy when a frame was due", u));
      if (i > 0) begin
        check(done[u], $sformatf("u%0d: not back to back", u));
        n_b2b++;
      end
      @(negedge clk);
      e.accept = cycle;
      t0 = cycle;
      q[u].push_back(e);
      dv[u] = 1'b0;
      check(act[u] && ser[u] == 1'b0, $sformatf("u%0d: start bit missing", u));
      repeat (frame_bits(u) * int'(cpb) / 2) @(negedge clk);
      tb_byte[u] = ~e.data;
      dv[u] = 1'b1;
      @(negedge clk);
      dv[u] = 1'b0;
      n_busy_ignored++;
      while (!done[u]) @(negedge clk);
      check(cycle - t0 == longint'(frame_bits(u) * int'(cpb)),
            $sformatf("u%0d: frame took %0d clocks", u, cycle - t0));
    end
  endtask

  // A frame driven by the testbench into the parity UART's receiver.
  // div is the sender's bit time, which may be shorter than the receiver's.
  task automatic inject(logic [7:0] d, bit bad, int div);
    exp_t e;
    logic [10:0] bits = {1'b1, (^d) ^ bad, d, 1'b0};
    e.data = d; e.perr = bad; e.accept = cycle;
    e.tframe = 11 * div;
    q[1].push_back(e);
    for (int k = 0; k < 11; k++) begin
      inj_line = bits[k];
      repeat (div) @(negedge clk);
    end
  endtask

  // The parity receiver cutting a stop bit short for a fast sender.
  always @(negedge clk)
    if (rst_n && u_par.u_rx.stop_done && !u_par.u_rx.bit_end) n_early++;

  task automatic settle();
    repeat (20) @(negedge clk);
    check(q[0].size() == 0 && q[1].size() == 0,
          $sformatf("bytes lost: %0d/%0d", q[0].size(), q[1].size()));
  endtask

  initial begin
    dv[0] = 1'b0; dv[1] = 1'b0; tb_byte[0] = '0; tb_byte[1] = '0;
    cpb = 16'd87;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      int div;
      div = (r == 0) ? 87 : (r == 1) ? 16 : (r == 2) ? 40 : 1000;
      if (cpb != CPB_W'(div)) n_switch++;
      cpb = CPB_W'(div);
      repeat (2) @(negedge clk);
      fork
        burst(0, (r == 3) ? 2 : 6);
        burst(1, (r == 3) ? 2 : 6);
      join
      settle();
      // Parity errors injected into the parity UART's receiver.
      if (r < 3) begin
        inj_sel = 1'b1;
        inject(8'($urandom), 1'b0, div);
        inject(8'($urandom), 1'b1, div);
        // A back-to-back burst from a sender about 2.5% fast (not at 16
        // clocks per bit, where one clock is 6%).
        if (div != 16)
          for (int i = 0; i < 4; i++) inject(8'($urandom), i == 2, div - (div + 39) / 40);
        // The receiver ends its last stop bit up to a bit time later.
        repeat (int'(cpb) + 10) @(negedge clk);
        inj_sel = 1'b0;
        settle();
      end
    end
    check(n_switch >= 1, "no baud rate switch");
    check(n_b2b >= 1, "no back-to-back frame");
    check(n_busy_ignored >= 1, "no request while busy");
    check(n_perr >= 1, "no parity error detected");
    check(n_fast >= 1, "no frame at 16 clocks per bit");
    check(n_early >= 1, "no stop bit cut short by a fast sender");
    check(n_rx[0] >= 1 && n_rx[1] >= 1, "nothing received");
    $display("mechanisms: switches=%0d back_to_back=%0d busy_ignored=%0d parity_errors=%0d fast_frames=%0d early_stop=%0d rx=%0d/%0d",
             n_switch, n_b2b, n_busy_ignored, n_perr, n_fast, n_early, n_rx[0], n_rx[1]);
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
