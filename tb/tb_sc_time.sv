// Self-checking test of sc_time at its full 39062-clock prescaler
// (512.0066 Hz from 20 MHz).  Checks the tick period in clocks, that the
// time advances by one per tick, loading a 32-bit time (including the
// roll-over from 0xFFFFFFFF), that a load restarts the prescaler, and that
// a board reset clears the time while the prescaler keeps its phase.
module tb_sc_time;
  localparam int DIV = 39_062;
  logic clk = 0, por_n = 0, rst_n = 0, wr = 0, tick;
  logic [31:0] wdata = '0, time_o;
  int checks = 0, failures = 0;

  sc_time dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic clocks_to_tick(output int n);
    n = 0;
    do begin @(negedge clk); n++; end while (!tick && n < 2 * DIV);
  endtask

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    por_n = 1; rst_n = 1; @(negedge clk);
    check(time_o == 0, "time zero after power-on");
    clocks_to_tick(n);
    for (int i = 0; i < 3; i++) begin
      logic [31:0] t0;
      t0 = time_o;
      clocks_to_tick(n);
      check(n == DIV, $sformatf("tick period %0d clocks", n));
      check(time_o == t0 + 1, "time advances by one per tick");
    end
    repeat (1000) @(negedge clk);
    wr = 1; wdata = 32'hFFFF_FFFF; @(negedge clk); wr = 0;
    check(time_o == 32'hFFFF_FFFF, "time loaded");
    clocks_to_tick(n);
    check(n == DIV - 1, $sformatf("first tick after load after %0d clocks", n));
    @(negedge clk);
    check(time_o == 32'h0, "roll-over");
    wr = 1; wdata = 32'h1234_5678; @(negedge clk); wr = 0;
    repeat (100) @(negedge clk);
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(time_o == 0, "board reset clears time");
    clocks_to_tick(n);
    check(n == DIV - 102, $sformatf("prescaler keeps phase over board reset (%0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
