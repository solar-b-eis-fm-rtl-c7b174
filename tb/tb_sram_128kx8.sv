// Self-checking test of sram_128kx8 at full size: writes a pattern
// derived from the address to 2000 random addresses plus both ends of
// the array, reads everything back, and checks that a deselected or
// output-disabled chip reads as zero and that a write with ce_n high is
// ignored.
module tb_sram_128kx8;
  logic clk = 0, ce_n = 1, we_n = 1, oe_n = 1;
  logic [16:0] addr = '0;
  logic [7:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [16:0] alist[$];

  sram_128kx8 dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input logic [16:0] a);
    return a[7:0] ^ {a[16:10], 1'b1} ^ 8'h5C;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alist.push_back(17'h00000); alist.push_back(17'h1FFFF);
    for (int i = 0; i < 2000; i++) alist.push_back(17'($urandom));
    foreach (alist[i]) begin
      @(negedge clk); ce_n = 0; we_n = 0; oe_n = 1; addr = alist[i]; din = pat(alist[i]);
    end
    @(negedge clk); we_n = 1; ce_n = 1;
    foreach (alist[i]) begin
      @(negedge clk); ce_n = 0; oe_n = 0; addr = alist[i]; #1;
      check(dout == pat(alist[i]), $sformatf("read %h", alist[i]));
    end
    ce_n = 1; #1 check(dout == 8'h00, "deselected reads zero");
    ce_n = 0; oe_n = 1; #1 check(dout == 8'h00, "output disabled reads zero");
    @(negedge clk); ce_n = 1; we_n = 0; addr = alist[0]; din = 8'hFF;
    @(negedge clk); we_n = 1; ce_n = 0; oe_n = 0; #1;
    check(dout == pat(alist[0]), "write with ce_n high ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
