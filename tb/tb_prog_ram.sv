// Self-checking test of prog_ram (128k x 48 bits from 128k x 8 SRAMs) at full
// size: writes words derived from the address to random locations and the
// two ends, reads them back, and checks that a read does not write and a
// deselected bank ignores writes.  Every byte lane is exercised.
module tb_prog_ram;
  logic clk = 0, cs = 0, we = 0;
  logic [16:0] addr = '0;
  logic [47:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [16:0] alist[$];

  prog_ram dut (.*);
  always #5 clk = ~clk;

  function automatic logic [47:0] pat(input logic [16:0] a);
    return {(48/16){a[15:0] ^ 16'hA5C3}} ^ {48{a[16]}} ^ 48'(a * 32'd2654435761);
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
    for (int i = 0; i < 1000; i++) alist.push_back(17'($urandom));
    foreach (alist[i]) begin
      @(negedge clk); cs = 1; we = 1; addr = alist[i]; wdata = pat(alist[i]);
    end
    @(negedge clk); we = 0;
    foreach (alist[i]) begin
      @(negedge clk); addr = alist[i]; #1;
      check(rdata == pat(alist[i]), $sformatf("read %h", alist[i]));
    end
    @(negedge clk); cs = 0; we = 1; addr = alist[0]; wdata = '1;
    @(negedge clk); cs = 1; we = 0; #1;
    check(rdata == pat(alist[0]), "deselected write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
