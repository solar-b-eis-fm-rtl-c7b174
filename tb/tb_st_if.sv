// Self-checking test of st_if.  Software writes a packet of random bytes to
// the ST FIFO and sets ~ST_GO; a receiver model samples ST_DATA on each
// rising ST_CLK while ST_ENA is high and rebuilds the bytes, which must
// equal the packet.  Also checks the status bits (~ST_GO, ~EF, ~FF,
// ST_ENA), that ~ST_GO returns to 1 by itself, that ST_ENA stays high
// without a gap for the whole packet, the packet duration
// (bytes x 8 x BIT_DIV clocks), the full flag of a reduced 16-byte FIFO,
// and the FIFO reset.
module tb_st_if;
  localparam int DEPTH = 16, BIT_DIV = 6;
  logic clk = 0, rst_n = 0, ctl_wr = 0, dat_wr = 0;
  logic [7:0] ctl_wdata = 8'hFF, dat_wdata = '0, stat;
  logic st_ena, st_clk, st_data;
  int checks = 0, failures = 0;
  logic [7:0] rx[$];
  logic [7:0] sh;
  int nbits = 0, ena_rises = 0, ena_cycles = 0;
  logic st_clk_q = 0, st_ena_q = 0;

  st_if #(.FIFO_DEPTH(DEPTH), .BIT_DIV(BIT_DIV)) dut (.*);
  always #5 clk = ~clk;

  // receiver model
  always @(posedge clk) begin
    st_clk_q <= st_clk;
    st_ena_q <= st_ena;
    if (st_ena && !st_ena_q) ena_rises++;
    if (st_ena) ena_cycles++;
    if (st_ena && st_clk && !st_clk_q) begin
      sh = {sh[6:0], st_data};
      nbits++;
      if (nbits % 8 == 0) rx.push_back(sh);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic ctl(input logic [7:0] v);
    ctl_wr = 1; ctl_wdata = v; @(negedge clk); ctl_wr = 0; ctl_wdata = 8'hFF;
  endtask
  task automatic wbyte(input logic [7:0] v);
    dat_wr = 1; dat_wdata = v; @(negedge clk); dat_wr = 0;
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] pkt[$];
    repeat (3) @(negedge clk);
    rst_n = 1; @(negedge clk);
    check(stat == 8'b1000_0010, $sformatf("idle status %b", stat));
    for (int n = 1; n <= 12; n += 11) begin
      pkt.delete(); rx.delete(); nbits = 0; ena_rises = 0; ena_cycles = 0;
      for (int i = 0; i < n; i++) begin
        pkt.push_back(8'($urandom)); wbyte(pkt[i]);
      end
      check(stat[2] && !st_ena, "loaded, not sending before GO");
      ctl(8'b0111_1111);
      @(negedge clk);
      check(!stat[7] && stat[0], "~ST_GO low and ST_ENA high while sending");
      while (!stat[7]) @(negedge clk);
      repeat (2) @(negedge clk);
      check(!st_ena && !stat[2], "idle and empty after packet");
      check(rx.size() == n, $sformatf("received %0d bytes, sent %0d", rx.size(), n));
      foreach (pkt[i]) check(rx[i] == pkt[i], $sformatf("byte %0d", i));
      check(ena_rises == 1, "ST_ENA one pulse per packet");
      check(ena_cycles == n * 8 * BIT_DIV, $sformatf("packet took %0d clocks", ena_cycles));
    end
    for (int i = 0; i < DEPTH; i++) wbyte(8'(i));
    check(!stat[1], "full flag with 16 bytes");
    ctl(8'b1111_1011);
    check(stat[1] && !stat[2], "reset empties FIFO");
    ctl(8'b0111_1111);
    repeat (3) @(negedge clk);
    check(stat[7] && !st_ena, "GO on empty FIFO ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
