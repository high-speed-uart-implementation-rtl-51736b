// tb_uart_top_full: uart_top at its default parameters, one complete
// operation in loopback.
//
// With 115200 baud from a 10 MHz clock (clks_per_bit = 87, a 100 ns clock
// period, so a bit time of 8.7 us) the byte 8'hAB is sent from tx_serial to
// rx_serial. Checked: the serial waveform bit by bit at each bit centre,
// tx_done exactly 870 clocks after tx_dv, and rx_dv with rx_byte = 8'hAB a few
// clocks after the end of the stop bit.
module tb_uart_top_full;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] cpb = 16'd87;
  logic        tx_dv = 1'b0;
  logic [7:0]  tx_byte = 8'h00;
  logic        ser, act, done, rdv, perr;
  logic [7:0]  rbyte;
  int          checks = 0, failures = 0;
  int          t_done = -1, t_rx = -1;
  logic [7:0]  got = 8'h00;

  always #50 clk = ~clk;   // 10 MHz

  uart_top u_dut (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb),
    .tx_dv(tx_dv), .tx_byte(tx_byte), .tx_serial(ser), .tx_active(act),
    .tx_done(done), .rx_serial(ser), .rx_dv(rdv), .rx_byte(rbyte),
    .rx_parity_err(perr));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [9:0] frame;
    frame = {1'b1, 8'hAB, 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(ser == 1'b1, "line idles high");
    tx_byte = 8'hAB;
    tx_dv   = 1'b1;
    @(negedge clk);
    tx_dv   = 1'b0;
    // Negedge number c after the accepting edge sees bit (c-1)/87.
    for (int c = 1; c <= 1000; c++) begin
      if ((c - 1) % 87 == 43 && (c - 1) / 87 < 10)
        check(ser == frame[(c - 1) / 87], $sformatf("bit %0d", (c - 1) / 87));
      if (done && t_done < 0) t_done = c - 1;
      if (rdv && t_rx < 0) begin
        t_rx = c - 1;
        got  = rbyte;
        check(!perr, "no parity error");
      end
      @(negedge clk);
    end
    check(t_done == 870, $sformatf("tx_done after %0d clocks", t_done));
    check(t_rx >= 872 && t_rx <= 876, $sformatf("rx_dv after %0d clocks", t_rx));
    check(got == 8'hAB, $sformatf("received %02h", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
