// Workload test of the SC_PROC board (sc_proc) at its default sizes: the
// largest transfers the document's buffers are built for, and a real
// watchdog time-out.
//   1. A command packet of 12288 bytes fills the 4k-word command FIFO to the
//      last word (~FF low, no overflow); one more packet then overflows it.
//      All 4096 words are read back and checked.
//   2. A mission data packet of two 4096-word sub-packets: the first is sent
//      with ~EOP = 1 and the link holds MD_ENA high while the second is
//      loaded; the interrupt comes once, after word 8192.  The FIFO reads
//      full after 4096 writes.  Every word is checked, and MD_ENA must stay
//      high for more than 8192 x 16 bits x 20 clocks (the wait while the
//      second sub-packet is loaded comes on top).
//   3. The watchdog is enabled with the 7.78 s time-out and left alone; the
//      trip must come 155,600,000 clocks after the enabling write, reboot the
//      board and leave ~WDTrip set, and the watchdog still enabled, for the
//      software: that register is cleared only at power-on.
// The MDP is modelled by the tasks and receivers below.
module tb_sc_proc_workloads;
  localparam int BOOT = 256, WORDS = 4096;
  localparam longint WD_CLOCKS = 155_600_000;
  logic clk = 0, por_n = 0;
  logic dsp_reset_n; logic [3:0] irq_n;
  logic [23:0] pma = '0; logic pmrd_n = 1, pmwr_n = 1; logic [47:0] pmd_o = '0, pmd_i; logic pmack;
  logic [31:0] dma = '0; logic dmrd_n = 1, dmwr_n = 1; logic [39:0] dmd_o = '0, dmd_i; logic dmack;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0, md_busy = 0;
  logic st_ena, st_clk, st_data, md_ena, md_clk, md_data;
  logic v_fail_n = 1, mhc_irq_n = 1, roe_irq_n = 1;
  logic [23:0] bpm_addr, bdm_addr; logic [15:0] bpm_wdata, bdm_wdata, bpm_rdata, bdm_rdata;
  logic bpm_rd_n, bpm_wr_n, cm_sel_n, mon_sel_n, prom_ce_n, bpm_ack_n, bdm_rd_n, bdm_wr_n, bdm_ack_n;
  logic [3:1] dms_n; logic [7:0] prom_d;
  logic [47:16] od_pmd; logic od0_n, od1_n, wrm_rst_n, wd_trip, dc_req, pm_held, dm_held;

  sc_proc dut (.*);
  boot_prom_model u_prom (.ce_n(prom_ce_n), .addr(bpm_addr[13:0]), .d(prom_d));
  always #5 clk = ~clk;

  assign bpm_rdata = '0;
  assign bdm_rdata = '0;
  assign bpm_ack_n = 1'b1;
  assign bdm_ack_n = 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] st_rx[$]; logic [15:0] md_rx[$];
  logic [7:0] st_sh; logic [15:0] md_sh; int st_n = 0, md_n = 0, md_ena_clocks = 0, md_ena_rises = 0;
  longint cyc = 0; logic md_ena_q = 0;
  logic st_clk_q = 0, md_clk_q = 0;
  always @(posedge clk) begin
    st_clk_q <= st_clk; md_clk_q <= md_clk; md_ena_q <= md_ena; cyc++;
    if (por_n && dsp_reset_n && md_ena && !md_ena_q) md_ena_rises++;
    // the MDP model listens only once the board is out of reset
    if (por_n && dsp_reset_n && md_ena) md_ena_clocks++;
    if (por_n && dsp_reset_n && st_ena && st_clk && !st_clk_q) begin
      st_sh = {st_sh[6:0], st_data}; st_n++; if (st_n % 8 == 0) st_rx.push_back(st_sh);
    end
    if (por_n && dsp_reset_n && md_ena && md_clk && !md_clk_q) begin
      md_sh = {md_sh[14:0], md_data}; md_n++; if (md_n % 16 == 0) md_rx.push_back(md_sh);
    end
  end
  task automatic send_cmd(input logic [7:0] bytes[$]);
    cmd_ena = 1; repeat (10) @(negedge clk);
    foreach (bytes[i]) for (int k = 7; k >= 0; k--) begin
      cmd_data = bytes[i][k]; repeat (10) @(negedge clk);
      cmd_clk = 1; repeat (10) @(negedge clk); cmd_clk = 0;
    end
    repeat (10) @(negedge clk); cmd_ena = 0; repeat (10) @(negedge clk);
  endtask

  int last_n;
  task automatic pm(input logic [23:0] a, input bit w, input logic [47:0] d, output logic [47:0] q);
    pma = a; pmrd_n = w; pmwr_n = !w; pmd_o = d; last_n = 0;
    do begin
      last_n++; #1 q = pmd_i;
      if (pmack) begin @(negedge clk); break; end
      @(negedge clk);
    end while (last_n < 100);
    pmrd_n = 1; pmwr_n = 1;
  endtask
  task automatic dm(input logic [31:0] a, input bit w, input logic [39:0] d, output logic [39:0] q);
    dma = a; dmrd_n = w; dmwr_n = !w; dmd_o = d; last_n = 0;
    do begin
      last_n++; #1 q = dmd_i;
      if (dmack) begin @(negedge clk); break; end
      @(negedge clk);
    end while (last_n < 100);
    dmrd_n = 1; dmwr_n = 1;
  endtask
  task automatic io_wr(input logic [3:0] port, input logic [47:0] d);
    logic [47:0] q; pm({3'b110, 17'h0, port}, 1, d, q);
  endtask
  task automatic io_rd(input logic [3:0] port, output logic [47:0] q);
    pm({3'b110, 17'h0, port}, 0, '0, q);
  endtask

  initial begin
    #4_000_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_boot();
    int t = 0;
    while (!dsp_reset_n && t < 100000) begin @(negedge clk); t++; end
    check(dsp_reset_n, "boot finished");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [47:0] q; logic [7:0] p[$]; logic [15:0] md_sent[$];
    longint t0, t1; int hold_seen;
    repeat (3) @(negedge clk);
    por_n = 1;
    wait_boot();

    // 1. command FIFO filled to the last word, then overflowed
    p = {};
    for (int i = 0; i < 3 * WORDS; i++) p.push_back(8'(i * 7 + 3));
    send_cmd(p);
    io_rd(4'h2, q);
    check(q[47:40] == 8'b0100_1100, $sformatf("command FIFO full, no overflow %b", q[47:40]));
    io_wr(4'h2, {8'b1110_1111, 40'h0});
    p = '{8'h55};
    send_cmd(p);
    io_rd(4'h2, q);
    check(q[43] == 1'b0, "overflow after the FIFO is full");
    for (int w = 0; w < WORDS; w++) begin
      logic [26:0] e;
      for (int b = 0; b < 3; b++)
        e[26 - 9*b -: 9] = {(w == WORDS - 1 && b == 2), 8'((3 * w + b) * 7 + 3)};
      io_rd(4'h3, q);
      check(q[47:21] == e, $sformatf("command word %0d", w));
    end
    io_rd(4'h2, q);
    check(q[42] == 1'b0, "command FIFO empty after reading 4096 words");
    io_wr(4'h2, {8'b1010_0111, 40'h0});       // clear flags

    // 2. mission data: two full sub-packets
    for (int sp = 0; sp < 2; sp++) begin
      for (int i = 0; i < WORDS; i++) begin
        automatic logic [15:0] v = 16'($urandom);
        io_wr(4'h7, {16'h0, v, 16'h0});
        md_sent.push_back(v);
      end
      io_rd(4'h6, q);
      check(q[46] == 1'b0, "mission data FIFO full after 4096 words");
      io_wr(4'h6, sp == 0 ? {8'b1111_0101, 40'h0} : {8'b1111_0001, 40'h0});
      if (sp == 0) begin
        hold_seen = 0;
        do begin repeat (50) @(negedge clk); io_rd(4'h6, q); end while (!q[41]);
        check(md_ena && irq_n[0], "link held between sub-packets, no interrupt");
      end
    end
    while (irq_n[0]) @(negedge clk);
    repeat (2) @(negedge clk);
    check(md_rx.size() == 2 * WORDS, $sformatf("mission data length %0d", md_rx.size()));
    foreach (md_sent[i]) if (i < md_rx.size()) check(md_rx[i] == md_sent[i], $sformatf("mission data word %0d", i));
    check(md_ena_rises == 1, $sformatf("one MD_ENA pulse for the packet (%0d)", md_ena_rises));
    check(md_ena_clocks > 2 * WORDS * 16 * 20, $sformatf("MD_ENA high %0d clocks", md_ena_clocks));

    // 3. watchdog trip at 7.78 s
    io_wr(4'h1, {8'b1010_1111, 40'h0});
    t0 = cyc;
    while (!wd_trip && cyc - t0 < WD_CLOCKS + 1000) @(posedge clk);
    t1 = cyc;
    check(wd_trip, "watchdog tripped");
    check(t1 - t0 >= WD_CLOCKS - 8 && t1 - t0 <= WD_CLOCKS + 8,
          $sformatf("watchdog tripped after %0d clocks", t1 - t0));
    @(negedge clk);
    while (wrm_rst_n) @(negedge clk);
    while (dsp_reset_n) @(negedge clk);
    wait_boot();
    io_rd(4'h1, q);
    check(q[47:40] == 8'b0011_1000, $sformatf("~WDTrip and ~WD_EN kept over the reboot %b", q[47:40]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
