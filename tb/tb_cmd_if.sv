// Self-checking test of cmd_if.  A model of the MDP sends packets over
// CMD_ENA/CMD_CLK/CMD_DATA (8 system clocks per bit); the expected FIFO
// words are packed here from the sent bytes (three per word, EOC on the
// last byte, zero padding) and compared with what the register port reads.
// Covers: status flags and CMD_ENA, interrupt on the end of a packet and
// its clear, packets of 1, 3 and 5 bytes, a bit error and its clear, the
// single-byte report, FIFO overflow (with a reduced 8-word FIFO), the
// half-full and full flags, and the interface reset.
module tb_cmd_if;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0;
  logic ctl_wr = 0, dat_rd = 0;
  logic [7:0] ctl_wdata = 8'hFF, stat;
  logic [26:0] dat_rdata;
  logic irq_n, single_cmd;
  logic [7:0] single_byte;
  int checks = 0, failures = 0;
  int singles = 0;
  logic [7:0] last_single;

  cmd_if #(.FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && single_cmd) begin singles++; last_single = single_byte; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bit(input logic b);
    cmd_data = b;
    repeat (4) @(negedge clk);
    cmd_clk = 1;
    repeat (4) @(negedge clk);
    cmd_clk = 0;
  endtask

  task automatic send(input logic [7:0] bytes[$], input int extra_bits);
    cmd_ena = 1;
    repeat (4) @(negedge clk);
    foreach (bytes[i]) for (int k = 7; k >= 0; k--) send_bit(bytes[i][k]);
    for (int k = 0; k < extra_bits; k++) send_bit(1'b1);
    check(stat[0] == 1'b1, "CMD_ENA visible during packet");
    repeat (4) @(negedge clk);
    cmd_ena = 0;
    repeat (8) @(negedge clk);
  endtask

  task automatic ctl(input logic [7:0] v);
    ctl_wr = 1; ctl_wdata = v; @(negedge clk); ctl_wr = 0; ctl_wdata = 8'hFF;
  endtask

  // expected FIFO words for a packet
  function automatic void pack(input logic [7:0] bytes[$], ref logic [26:0] words[$]);
    int n = bytes.size();
    for (int i = 0; i < n; i += 3) begin
      logic [26:0] w = '0;
      for (int j = 0; j < 3; j++)
        if (i + j < n) w[26-9*j -: 9] = {(i + j == n - 1), bytes[i+j]};
      words.push_back(w);
    end
  endfunction

  task automatic read_check(input logic [26:0] exp, input string what);
    check(stat[2] == 1'b1, {what, ": not empty"});
    check(dat_rdata == exp, $sformatf("%s: got %h exp %h", what, dat_rdata, exp));
    dat_rd = 1; @(negedge clk); dat_rd = 0;
  endtask

  initial begin
    #3_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] p[$];
    logic [26:0] w[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(stat == 8'b0111_1010, $sformatf("idle status %b", stat));
    check(irq_n, "no interrupt after reset");

    // five-byte packet
    p = '{8'h12, 8'h34, 8'h56, 8'h78, 8'h9A};
    send(p, 0);
    check(!irq_n && !stat[4], "interrupt at end of packet");
    w.delete(); pack(p, w);
    foreach (w[i]) read_check(w[i], "5-byte packet");
    check(stat[2] == 1'b0, "empty after reading packet");
    check(singles == 0, "no single-byte report for 5 bytes");
    ctl(8'b1110_1111);
    check(irq_n && stat[4], "interrupt cleared");

    // three-byte packet: one word, EOC on the third byte
    p = '{8'hA1, 8'hB2, 8'hC3};
    send(p, 0);
    w.delete(); pack(p, w);
    check(w.size() == 1, "reference packs three bytes in one word");
    read_check(w[0], "3-byte packet");
    ctl(8'b1110_1111);

    // bit error: two bytes and three stray bits
    p = '{8'h0F, 8'hF0};
    send(p, 3);
    check(!stat[6], "bit error flagged");
    w.delete(); pack(p, w);
    read_check(w[0], "packet with bit error");
    ctl(8'b1010_1111);
    check(stat[6] && stat[4], "bit error and interrupt cleared");

    // single-byte command
    p = '{8'hF5};
    send(p, 0);
    check(singles == 1 && last_single == 8'hF5, "single-byte report");
    read_check({1'b1, 8'hF5, 18'h0}, "single byte packet");
    ctl(8'b1110_1111);

    // overflow: 30 bytes = 10 words into an 8-word FIFO
    p.delete();
    for (int i = 0; i < 30; i++) p.push_back(8'($urandom));
    send(p, 0);
    check(!stat[3], "overflow flagged");
    check(!stat[1], "full flag");
    check(!stat[5], "half-full flag");
    w.delete(); pack(p, w);
    for (int i = 0; i < DEPTH; i++) read_check(w[i], "words kept on overflow");
    check(!stat[2], "overflowed words lost");
    ctl(8'b1111_0111);
    check(stat[3], "overflow cleared");

    // interface reset empties the FIFO and clears the interrupt
    p = '{8'h01, 8'h02};
    send(p, 0);
    check(stat[2] && !irq_n, "data and interrupt before reset");
    ctl(8'b1111_1011);
    check(!stat[2] && irq_n, "reset empties FIFO, clears interrupt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
