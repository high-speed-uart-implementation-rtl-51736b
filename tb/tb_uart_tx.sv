// tb_uart_tx: self-checking testbench for uart_tx.
//
// Two transmitters run side by side, one without and one with the parity bit.
// For each frame the testbench builds the expected bit sequence itself (start
// 0, data LSB first, even parity, stop 1) and checks tx_serial on every single
// clock of the frame: bit k must be on the line exactly from clock
// edge k*clks_per_bit to edge (k+1)*clks_per_bit counted from the edge that
// takes tx_dv. It also
// checks tx_active, the tx_done pulse at the exact end of the stop bit, that
// a tx_dv while busy is ignored.
module tb_uart_tx;
  localparam int CPB_W = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CPB_W-1:0] cpb;
  logic             dv0, dv1;
  logic [7:0]       byte0, byte1;
  logic             ser0, ser1, act0, act1, done0, done1;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.DATA_BITS(8), .PARITY_EN(1'b0), .CPB_W(CPB_W)) u_np (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .tx_dv(dv0), .tx_byte(byte0),
    .tx_serial(ser0), .tx_active(act0), .tx_done(done0));
  uart_tx #(.DATA_BITS(8), .PARITY_EN(1'b1), .CPB_W(CPB_W)) u_par (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .tx_dv(dv1), .tx_byte(byte1),
    .tx_serial(ser1), .tx_active(act1), .tx_done(done1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Expected line level in bit slot k of a frame.
  function automatic bit frame_bit(logic [7:0] d, bit par, int k);
    if (k == 0) return 1'b0;
    if (k <= 8) return d[k-1];
    if (par && k == 9) return ^d;
    return 1'b1;
  endfunction

  // Sends one frame on both transmitters at once (same divisor) and checks
  // every clock. Signals are driven and sampled at the falling edge.
  task automatic send_and_check(logic [7:0] d0, logic [7:0] d1, int div, bit poke_busy);
    int total0 = 10 * div, total1 = 11 * div;
    cpb = CPB_W'(div);
    byte0 = d0; byte1 = d1;
    dv0 = 1'b1; dv1 = 1'b1;
    @(negedge clk);
    dv0 = 1'b0; dv1 = 1'b0;
    for (int c = 1; c <= total1 + 1; c++) begin
      // sampled c-1 clock edges after the edge that took tx_dv
      if (c <= total0 + 1) begin
        check(ser0 == frame_bit(d0, 1'b0, (c - 1) / div), $sformatf("np bit c=%0d", c));
        check(act0 == (c <= total0), "np active");
        check(done0 == (c == total0 + 1), $sformatf("np done c=%0d", c));
      end else begin
        check(ser0 == 1'b1 && !act0 && !done0, "np idle after frame");
      end
      check(ser1 == frame_bit(d1, 1'b1, (c - 1) / div), $sformatf("par bit c=%0d", c));
      check(act1 == (c <= total1), "par active");
      check(done1 == (c == total1 + 1), $sformatf("par done c=%0d", c));
      // A request in mid frame must be ignored.
      if (poke_busy && c == 3 * div) begin
        byte0 = ~d0; byte1 = ~d1;
        dv0 = 1'b1; dv1 = 1'b1;
      end else begin
        dv0 = 1'b0; dv1 = 1'b0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    cpb = 16'd87;
    dv0 = 1'b0; dv1 = 1'b0; byte0 = '0; byte1 = '0;
    repeat (2) @(negedge clk);
    check(ser0 == 1'b1 && ser1 == 1'b1, "line idle high in reset");
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(ser0 == 1'b1 && !act0 && !done0, "idle after reset");
    send_and_check(8'hAB, 8'hAB, 87, 1'b0);     // 115200 baud at 10 MHz
    send_and_check(8'h01, 8'h03, 16, 1'b1);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom);
      b = 8'($urandom);
      send_and_check(a, b, 16 + int'($urandom_range(0, 40)), i[0]);
    end
    send_and_check(8'hFF, 8'h00, 17, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
