// Self-checking test of fifo_4kx9 at its full 4096-word depth.
// Fills the FIFO with random words while a reference queue records them,
// checks the half-full flag at 2048/2049 words and the full flag at 4096,
// checks that a write to a full FIFO is dropped, then mixes simultaneous
// reads and writes, drains it comparing every word, and checks the empty
// flag and the synchronous reset.
module tb_fifo_4kx9;
  logic clk = 0, rs_n = 0, wr = 0, rd = 0;
  logic [8:0] din = '0, dout;
  logic ef_n, ff_n, hf_n;
  int checks = 0, failures = 0;
  logic [8:0] model[$];

  fifo_4kx9 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Inputs change at the falling edge; the FIFO acts on the rising edge.
  task automatic push(input logic [8:0] d);
    wr = 1; din = d; @(negedge clk); wr = 0;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rs_n = 1;
    @(negedge clk);
    check(!ef_n && ff_n && hf_n, "flags after reset");
    for (int i = 0; i < 4096; i++) begin
      automatic logic [8:0] v = 9'($urandom);
      push(v); model.push_back(v);
      if (i == 2047) check(hf_n, "not half full at 2048");
      if (i == 2048) check(!hf_n, "half full at 2049");
      if (i == 4094) check(ff_n, "not full at 4095");
    end
    check(!ff_n && ef_n, "full at 4096");
    check(dout == model[0], "head word when full");
    push(9'h1AA);                       // dropped
    // read one, write one; a write in the same clock as a read of a full
    // FIFO is refused, as the full flag blocks writes
    for (int i = 0; i < 100; i++) begin
      automatic logic [8:0] v = 9'($urandom);
      automatic bit was_full = (model.size() == 4096);
      check(dout == model[0], "head during mixed traffic");
      rd = 1; wr = (i % 2 == 0); din = v;
      @(negedge clk);
      rd = 0; wr = 0;
      void'(model.pop_front());
      if (i % 2 == 0 && !was_full) model.push_back(v);
    end
    while (model.size() > 0) begin
      check(dout == model[0], "drained word");
      rd = 1; @(negedge clk); rd = 0;
      void'(model.pop_front());
    end
    check(!ef_n && hf_n && ff_n, "empty after drain");
    push(9'h055); push(9'h0AA);
    check(ef_n && dout == 9'h055, "refill after empty");
    rs_n = 0; @(negedge clk); rs_n = 1;
    check(!ef_n, "empty after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
