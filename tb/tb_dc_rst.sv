// Self-checking test of dc_rst with a window of 8 ticks and a tick every
// 10 clocks.  Two single-byte 0xF5 commands inside the window must give
// exactly one request; 0xF5 commands further apart, other single bytes,
// and a single 0xF5 must give none; a non-0xF5 command between two 0xF5
// commands does not disarm the window.  The edge of the window is checked
// on both sides.
module tb_dc_rst;
  localparam int WIN = 8, TDIV = 10;
  logic clk = 0, rst_n = 0, single_cmd = 0, req;
  logic [7:0] single_byte = '0;
  logic tick;
  int checks = 0, failures = 0, reqs = 0, tcnt = 0;

  dc_rst #(.WINDOW(WIN)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
    if (rst_n && req) reqs++;
  end
  assign tick = (tcnt == TDIV - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic cmd(input logic [7:0] b);
    single_cmd = 1; single_byte = b; @(negedge clk); single_cmd = 0;
  endtask
  task automatic wait_ticks(input int n);
    repeat (n * TDIV) @(negedge clk);
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; @(negedge clk);
    cmd(8'hF5); wait_ticks(3); cmd(8'hF5); @(negedge clk);
    check(reqs == 1, "two 0xF5 within window");
    wait_ticks(2 * WIN);
    check(reqs == 1, "request is a single pulse");
    cmd(8'hF5); wait_ticks(WIN + 1); cmd(8'hF5); @(negedge clk);
    check(reqs == 1, "0xF5 commands too far apart");
    wait_ticks(2 * WIN);
    cmd(8'hF4); cmd(8'hF4); cmd(8'h75); cmd(8'h75); cmd(8'h00); @(negedge clk);
    check(reqs == 1, "other single bytes ignored");
    cmd(8'hF5); wait_ticks(1); cmd(8'h10); wait_ticks(1); cmd(8'hF5); @(negedge clk);
    check(reqs == 2, "other command between does not disarm");
    wait_ticks(2 * WIN);
    cmd(8'hF5); wait_ticks(WIN - 1); cmd(8'hF5); @(negedge clk);
    check(reqs == 3, "second 0xF5 just inside the window");
    wait_ticks(2 * WIN);
    cmd(8'hF5); wait_ticks(2 * WIN);
    check(reqs == 3, "a lone 0xF5 does nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
