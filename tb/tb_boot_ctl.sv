// Self-checking test of boot_ctl with a 20-instruction loader.  A bus model
// answers PROM reads at 0xE0 0000 + n with the byte (n * 37 + 11) mod 256
// on PMD[23:16] after four clocks, and acknowledges program RAM writes at
// once, recording them.  Checks that instruction i is written to address i
// as PROM bytes 6i..6i+5, most significant first, that the bytes are read
// in order, that the DSP is held in reset until the last write and then
// released, the total boot time, and that a new reset repeats the copy.
module tb_boot_ctl;
  localparam int WORDS = 20, PROM_CYC = 4;
  logic clk = 0, rst_n = 0;
  logic dsp_rst_n, busy, m_rd, m_wr, m_ack;
  logic [23:0] m_addr;
  logic [47:0] m_wdata, m_rdata;
  int checks = 0, failures = 0;
  int wait_cnt = 0, nreads = 0, order_err = 0, cycles = 0;
  logic [47:0] ram[WORDS];
  int nwrites = 0;

  boot_ctl #(.BOOT_WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] prom_byte(input int n);
    return 8'((n * 37 + 11) % 256);
  endfunction

  assign m_ack   = m_wr || (m_rd && wait_cnt == PROM_CYC - 1);
  assign m_rdata = {24'h0, prom_byte(int'(m_addr[20:0])), 16'h0};
  always @(posedge clk) begin
    if (!rst_n) begin
      wait_cnt <= 0; nreads <= 0; nwrites <= 0;
    end else begin
      if (dsp_rst_n && busy) order_err++;
      if (m_rd) begin
        if (m_addr[23:21] != 3'b111 || int'(m_addr[20:0]) != nreads) order_err++;
        wait_cnt <= m_ack ? 0 : wait_cnt + 1;
        if (m_ack) nreads <= nreads + 1;
      end
      if (m_wr) begin
        if (int'(m_addr) < WORDS) ram[$clog2(WORDS)'(m_addr)] <= m_wdata;
        nwrites <= nwrites + 1;
      end
      if (busy) cycles++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      rst_n = 0; cycles = 0; ram = '{default: '0};
      repeat (3) @(negedge clk);
      rst_n = 1;
      check(!dsp_rst_n && busy, "DSP held in reset during boot");
      while (busy && cycles < 10000) @(negedge clk);
      check(dsp_rst_n, "DSP released after copy");
      check(nreads == 6 * WORDS && nwrites == WORDS, $sformatf("%0d reads, %0d writes", nreads, nwrites));
      check(order_err == 0, "PROM read in order, reset held while busy");
      check(cycles == WORDS * (6 * PROM_CYC + 1), $sformatf("boot took %0d clocks", cycles));
      for (int i = 0; i < WORDS; i++) begin
        logic [47:0] exp;
        for (int b = 0; b < 6; b++) exp[47-8*b -: 8] = prom_byte(6 * i + b);
        check(ram[i] == exp, $sformatf("instruction %0d = %h, expected %h", i, ram[i], exp));
      end
      repeat (10) @(negedge clk);
      check(nwrites == WORDS && dsp_rst_n, "bus idle after boot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
