// tb_baud_gen: self-checking testbench for baud_gen.
//
// Runs a 16x instance and a 1x (prescaler) instance side by side. After each
// sync it predicts, for every later clock edge n, whether a tick is acted on
// at that edge: exactly when floor(n*OVERSAMPLE/clks_per_bit) steps up. This
// is checked edge by edge over several bit times for a range of divisors,
// including one equal to OVERSAMPLE (a tick every clock), and the number of
// ticks per bit time is checked to be exactly OVERSAMPLE.
module tb_baud_gen;
  localparam int CPB_W = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CPB_W-1:0] cpb;
  logic             sync;
  logic             tick16, tick1;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen #(.OVERSAMPLE(16), .CPB_W(CPB_W)) u_os16 (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .sync(sync), .tick(tick16));
  baud_gen #(.OVERSAMPLE(1), .CPB_W(CPB_W)) u_os1 (
    .clk(clk), .rst_n(rst_n), .clks_per_bit(cpb), .sync(sync), .tick(tick1));

  function automatic bit expect_tick(int n, int os, int div);
    return ((n * os) / div) != (((n - 1) * os) / div);
  endfunction

  task automatic run_divisor(int div, int nbits);
    int n16, n1;
    cpb  = CPB_W'(div);
    sync = 1'b1;
    @(negedge clk);          // sync is taken at the edge before this point
    sync = 1'b0;
    n16 = 0; n1 = 0;
    // Sampled at the falling edge: tick now is acted on at the coming edge n.
    for (int n = 1; n <= nbits * div; n++) begin
      checks++;
      if (tick16 !== expect_tick(n, 16, div)) begin
        failures++;
        $display("FAIL os16 div=%0d edge %0d tick=%0b", div, n, tick16);
      end
      checks++;
      if (tick1 !== expect_tick(n, 1, div)) begin
        failures++;
        $display("FAIL os1 div=%0d edge %0d tick=%0b", div, n, tick1);
      end
      n16 += int'(tick16);
      n1  += int'(tick1);
      @(negedge clk);
    end
    checks++;
    if (n16 != 16 * nbits || n1 != nbits) begin
      failures++;
      $display("FAIL div=%0d: %0d/%0d ticks in %0d bit times", div, n16, n1, nbits);
    end
  endtask

  initial begin
    cpb  = 16'd87;
    sync = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sync  = 1'b1;
    @(negedge clk);
    run_divisor(87, 4);     // 115200 baud at 10 MHz
    run_divisor(16, 3);     // fastest: one tick every clock
    run_divisor(17, 3);
    run_divisor(160, 2);    // exact multiple of 16
    run_divisor(1000, 2);
    // A sync in mid count restarts the phase.
    cpb = 16'd87;
    repeat (30) @(negedge clk);
    run_divisor(87, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
