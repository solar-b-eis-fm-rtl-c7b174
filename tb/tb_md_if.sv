// Self-checking test of md_if.  Software sends a mission data packet of
// three sub-packets: it fills the (reduced, 8-word) MD FIFO, sets ~GO with
// ~EOP = 1 for the first two and ~EOP = 0 for the last.  A receiver model
// samples MD_DATA on each rising MD_CLK while MD_ENA is high and rebuilds
// 16-bit words, which must equal all the words written.  Also checks that
// the MDP's BUSY holds off the start, that MD_ENA stays high between
// sub-packets, that ~GO returns to 1 after each sub-packet, that the
// interrupt comes only after the last sub-packet (falling edge of MD_ENA),
// its clear, the status flags and the interface reset.
module tb_md_if;
  localparam int DEPTH = 8, BIT_DIV = 4;
  logic clk = 0, rst_n = 0, ctl_wr = 0, dat_wr = 0, md_busy = 1;
  logic [7:0] ctl_wdata = 8'hFF, stat;
  logic [15:0] dat_wdata = '0;
  logic md_ena, md_clk, md_data, irq_n;
  int checks = 0, failures = 0;
  logic [15:0] rx[$], sent[$];
  logic [15:0] sh;
  int nbits = 0, ena_rises = 0, ena_falls = 0;
  logic md_clk_q = 0, md_ena_q = 0;

  md_if #(.FIFO_DEPTH(DEPTH), .BIT_DIV(BIT_DIV)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    md_clk_q <= md_clk;
    md_ena_q <= md_ena;
    // the receiver listens only once the interface is out of reset
    if (rst_n && md_ena && !md_ena_q) ena_rises++;
    if (rst_n && !md_ena && md_ena_q) ena_falls++;
    if (rst_n && md_ena && md_clk && !md_clk_q) begin
      sh = {sh[14:0], md_data};
      nbits++;
      if (nbits % 16 == 0) rx.push_back(sh);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic ctl(input logic [7:0] v);
    ctl_wr = 1; ctl_wdata = v; @(negedge clk); ctl_wr = 0; ctl_wdata = 8'hFF;
  endtask
  task automatic wword(input logic [15:0] v);
    dat_wr = 1; dat_wdata = v; @(negedge clk); dat_wr = 0;
    sent.push_back(v);
  endtask

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; repeat (3) @(negedge clk);
    check(stat[6] && !stat[5] && stat[4] && stat[3] && stat[1], $sformatf("idle status %b", stat));
    for (int sp = 0; sp < 3; sp++) begin
      automatic bit last = (sp == 2);
      for (int i = 0; i < DEPTH; i++) wword(16'($urandom));
      check(!stat[6] && stat[5], "FIFO full and not empty");
      // ~GO = 0, ~EOP = 1 for more sub-packets, 0 for the last
      ctl({4'b1111, 1'b1, !last, 1'b0, 1'b1});
      if (sp == 0) begin
        repeat (20) @(negedge clk);
        check(!md_ena && stat[4], "BUSY holds off the first sub-packet");
        md_busy = 0;
      end
      @(negedge clk);
      while (!stat[1]) @(negedge clk);
      repeat (3) @(negedge clk);
      check(!stat[5], "FIFO empty after sub-packet");
      if (!last) begin
        check(md_ena, "MD_ENA held between sub-packets");
        check(irq_n, "no interrupt between sub-packets");
      end
    end
    check(!md_ena && !irq_n && !stat[3], "interrupt after last sub-packet");
    check(ena_rises == 1 && ena_falls == 1, "one MD_ENA pulse for the packet");
    check(rx.size() == sent.size(), $sformatf("received %0d words of %0d", rx.size(), sent.size()));
    foreach (sent[i]) check(rx[i] == sent[i], $sformatf("word %0d", i));
    ctl(8'b1111_0011);
    check(irq_n && stat[3], "interrupt cleared");
    wword(16'h1234);
    ctl(8'b0111_1111);
    check(!stat[5] && !md_ena, "reset empties FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
