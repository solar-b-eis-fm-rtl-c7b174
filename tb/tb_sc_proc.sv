// End-to-end test of the SC_PROC board (sc_proc) at reduced sizes: 16-word
// FIFOs, 4 clocks per serial bit, a 50-clock time tick, 3000/6000-clock
// watchdog, an 8-tick discrete reset window and a 16-instruction boot
// loader; the RAMs keep their full 128k words.  The testbench plays the
// DSP (bus accesses once dsp_reset_n is released), the MDP (command link
// out, status and mission data links in, BUSY), a backplane card that
// stretches some accesses, the MON card's ~V_FAIL, and the boot PROM.
//
// It boots the board, checks the copied loader in program RAM, uses both
// RAMs, the on-board ports, the buffered PM and DM spaces and the PROM,
// receives a command packet by interrupt, sends a status packet and a
// two-sub-packet mission data packet held off by BUSY, provokes a command
// FIFO overflow and a bit error, and reboots the board three ways
// (~V_FAIL, watchdog time-out, two 0xF5 commands), booting again each
// time.  Every mechanism is counted and must have happened at least once.
module tb_sc_proc;
  localparam int BOOT = 16, TDIV = 50, WDS = 3000, FD = 16;

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

  sc_proc #(.FIFO_DEPTH(FD), .BIT_DIV(4), .TICK_DIV(TDIV), .WD_SHORT(WDS),
            .WD_LONG(2 * WDS), .DC_WINDOW(8), .BOOT_WORDS(BOOT)) dut (.*);
  boot_prom_model u_prom (.ce_n(prom_ce_n), .addr(bpm_addr[13:0]), .d(prom_d));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- events
  int n_boot = 0, n_pm_held = 0, n_dm_held = 0, n_wd_trip = 0, n_dc = 0;
  int n_vfail = 0, n_cmd_irq = 0, n_md_irq = 0, n_od0 = 0, n_md_hold = 0;
  int n_busy_wait = 0, n_ovr = 0, n_biterr = 0, n_prom = 0;
  // Events are counted from the clock after power-on reset, once every
  // register of the board has been cleared.
  logic rst_q = 0, cmd_irq_q = 1, md_irq_q = 1, wrm_q = 1, por_q = 0;
  always @(posedge clk) por_q <= por_n;
  always @(posedge clk) if (por_q) begin
    rst_q <= dsp_reset_n; cmd_irq_q <= irq_n[3]; md_irq_q <= irq_n[0]; wrm_q <= wrm_rst_n;
    if (dsp_reset_n && !rst_q) n_boot++;
    if (pm_held && !bpm_rd_n && bpm_ack_n) n_pm_held++;
    if (dm_held && !bdm_rd_n && bdm_ack_n) n_dm_held++;
    if (wd_trip) n_wd_trip++;
    if (dc_req) n_dc++;
    if (!wrm_rst_n && wrm_q && !v_fail_n) n_vfail++;
    if (!irq_n[3] && cmd_irq_q && dsp_reset_n) n_cmd_irq++;
    if (!irq_n[0] && md_irq_q && dsp_reset_n) n_md_irq++;
    if (!od0_n) n_od0++;
    if (md_ena && md_busy) n_busy_wait++;       // must never happen
    if (!prom_ce_n && !bpm_rd_n && dsp_reset_n) n_prom++;
  end

  // ---------------------------------------------------------------- backplane
  // bp_hold: clocks of the strobe during which the card holds its ack low
  int bp_hold = 0, bp_cnt = 0;
  always @(posedge clk) bp_cnt <= (!bpm_rd_n || !bpm_wr_n || !bdm_rd_n || !bdm_wr_n) ? bp_cnt + 1 : 0;
  assign bpm_rdata = bpm_addr[15:0] ^ 16'h5A5A;
  assign bdm_rdata = bdm_addr[15:0] ^ 16'hC33C;
  assign bpm_ack_n = !(!bpm_rd_n && bp_cnt < bp_hold);
  assign bdm_ack_n = !(!bdm_rd_n && bp_cnt < bp_hold);

  // ---------------------------------------------------------------- MDP
  logic [7:0] st_rx[$]; logic [15:0] md_rx[$];
  logic [7:0] st_sh; logic [15:0] md_sh; int st_n = 0, md_n = 0;
  logic st_clk_q = 0, md_clk_q = 0, md_ena_q = 0;
  always @(posedge clk) begin
    st_clk_q <= st_clk; md_clk_q <= md_clk; md_ena_q <= md_ena;
    if (st_ena && st_clk && !st_clk_q) begin
      st_sh = {st_sh[6:0], st_data}; st_n++; if (st_n % 8 == 0) st_rx.push_back(st_sh);
    end
    if (md_ena && md_clk && !md_clk_q) begin
      md_sh = {md_sh[14:0], md_data}; md_n++; if (md_n % 16 == 0) md_rx.push_back(md_sh);
    end
  end
  task automatic send_cmd(input logic [7:0] bytes[$], input int extra);
    cmd_ena = 1; repeat (3) @(negedge clk);
    foreach (bytes[i]) for (int k = 7; k >= 0; k--) begin
      cmd_data = bytes[i][k]; repeat (3) @(negedge clk);
      cmd_clk = 1; repeat (3) @(negedge clk); cmd_clk = 0;
    end
    for (int k = 0; k < extra; k++) begin
      repeat (3) @(negedge clk); cmd_clk = 1; repeat (3) @(negedge clk); cmd_clk = 0;
    end
    repeat (3) @(negedge clk); cmd_ena = 0; repeat (6) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- DSP
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
  task automatic wait_boot();
    int n = 0;
    while (dsp_reset_n && n < 100000) begin @(negedge clk); n++; end
    while (!dsp_reset_n && n < 100000) begin @(negedge clk); n++; end
    repeat (2) @(negedge clk);
  endtask
  task automatic check_loader(input string when);
    logic [47:0] q, exp;
    for (int i = 0; i < BOOT; i++) begin
      for (int b = 0; b < 6; b++) exp[47-8*b -: 8] = 8'(((6 * i + b) * 37 + 11) % 256);
      pm(24'(i), 0, '0, q);
      check(q == exp, $sformatf("%s: loader word %0d = %h, expected %h", when, i, q, exp));
    end
  endtask

  initial begin
    #40_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] q; logic [39:0] dq; logic [7:0] p[$];
    int t0;
    repeat (3) @(negedge clk);
    por_n = 1;
    check(!dsp_reset_n, "DSP held in reset while booting");
    t0 = 0;
    while (!dsp_reset_n && t0 < 100000) begin @(negedge clk); t0++; end
    check(t0 == BOOT * (6 * 4 + 1), $sformatf("boot took %0d clocks", t0));
    repeat (2) @(negedge clk);
    check_loader("power-on");

    // program and data RAM, no wait states
    pm(24'h01_0000, 1, 48'h0123_4567_89AB, q);
    check(last_n == 1, "program RAM write without wait");
    pm(24'h01_0000, 0, '0, q);
    check(last_n == 1 && q == 48'h0123_4567_89AB, "program RAM read");
    dm(32'h0001_FFFF, 1, {32'hFEDC_BA98, 8'h00}, dq);
    dm(32'h0001_FFFF, 0, '0, dq);
    check(last_n == 1 && dq[39:8] == 32'hFEDC_BA98, "data RAM on DMD[39:8]");

    // on-board ports: three wait states
    io_wr(4'h0, {32'h0000_1000, 16'h0});
    check(last_n == 4, "TWIB port write in 4 clocks");
    io_rd(4'h0, q);
    check(last_n == 4 && q[47:16] >= 32'h1000 && q[47:16] <= 32'h1001, "time read");

    // buffered spaces
    pm(24'h80_0010, 0, '0, q);
    check(last_n == 4 && q[31:16] == (16'h0010 ^ 16'h5A5A), "CM_Ctl read, 4 clocks, PMD[31:16]");
    bp_hold = 7;
    pm(24'hA0_0003, 0, '0, q);
    check(last_n == 9 && q[31:16] == (16'h0003 ^ 16'h5A5A), $sformatf("MON read stretched to %0d", last_n));
    dm(32'h0300_0100, 0, '0, dq);
    check(last_n == 9 && dq[23:8] == (16'h0100 ^ 16'hC33C), $sformatf("EEPROM read stretched to %0d", last_n));
    bp_hold = 0;
    pm(24'hE0_0007, 0, '0, q);
    check(q[23:16] == 8'((7 * 37 + 11) % 256), "DSP reads PROM on PMD[23:16]");

    // command packet by interrupt
    p = '{8'h10, 8'h20, 8'h30, 8'h40, 8'h50};
    send_cmd(p, 0);
    check(!irq_n[3], "command interrupt on ~IRQ3");
    io_rd(4'h3, q); check(q[47:21] == {1'b0, 8'h10, 1'b0, 8'h20, 1'b0, 8'h30}, "command word 1");
    io_rd(4'h3, q); check(q[47:21] == {1'b0, 8'h40, 1'b1, 8'h50, 9'h0}, "command word 2");
    io_wr(4'h2, {8'b1110_1111, 40'h0});
    check(irq_n[3], "command interrupt cleared");

    // bit error and overflow (16-word FIFO, 20 words sent)
    p.delete(); for (int i = 0; i < 3 * (FD + 4); i++) p.push_back(8'(i));
    send_cmd(p, 5);
    io_rd(4'h2, q);
    if (!q[43]) n_ovr++;
    if (!q[46]) n_biterr++;
    check(!q[43] && !q[46] && !q[41], $sformatf("overflow, bit error, full: %b", q[47:40]));
    io_wr(4'h2, {8'b1111_1011, 40'h0});   // reset interface
    io_wr(4'h2, {8'b1010_0111, 40'h0});   // clear flags
    io_rd(4'h2, q);
    check(q[47:40] == 8'b0111_1010, $sformatf("command interface clean %b", q[47:40]));

    // status packet
    for (int i = 0; i < 5; i++) io_wr(4'h5, {24'h0, 8'(8'hC0 + i), 16'h0});
    io_wr(4'h4, {8'b0111_1111, 40'h0});
    do io_rd(4'h4, q); while (!q[47]);
    repeat (4) @(negedge clk);
    check(st_rx.size() == 5, "status packet length");
    foreach (st_rx[i]) check(st_rx[i] == 8'(8'hC0 + i), "status byte");

    // mission data: two sub-packets, the first held off by BUSY
    md_busy = 1;
    for (int i = 0; i < 3; i++) io_wr(4'h7, {16'h0, 16'(16'hD000 + i), 16'h0});
    io_wr(4'h6, {8'b1111_0101, 40'h0});   // ~EOP = 1, ~GO = 0
    repeat (40) @(negedge clk);
    check(!md_ena, "BUSY holds mission data");
    md_busy = 0;
    do io_rd(4'h6, q); while (!q[41]);
    repeat (4) @(negedge clk);
    if (md_ena) n_md_hold++;
    check(md_ena && irq_n[0], "MD_ENA held between sub-packets");
    for (int i = 3; i < 6; i++) io_wr(4'h7, {16'h0, 16'(16'hD000 + i), 16'h0});
    io_wr(4'h6, {8'b1111_0001, 40'h0});   // ~EOP = 0, ~GO = 0
    while (irq_n[0]) @(negedge clk);
    check(md_rx.size() == 6, "mission data packet length");
    foreach (md_rx[i]) check(md_rx[i] == 16'(16'hD000 + i), "mission data word");
    io_wr(4'h6, {8'b1111_0011, 40'h0});
    check(irq_n[0], "mission data interrupt cleared");

    // OD test port and passed-through interrupts
    io_wr(4'h8, {32'h5EED_F00D, 16'h0});
    check(n_od0 == 1, "OD0 strobe");
    mhc_irq_n = 0; roe_irq_n = 0; #1;
    check(irq_n[2:1] == 2'b00, "MHC and ROE interrupts passed through");
    mhc_irq_n = 1; roe_irq_n = 1;

    // reboot 1: ~V_FAIL
    dm(32'h0000_0400, 1, {32'h1357_9BDF, 8'h0}, dq);
    v_fail_n = 0; repeat (10) @(negedge clk); v_fail_n = 1;
    wait_boot();
    check_loader("after ~V_FAIL");
    dm(32'h0000_0400, 0, '0, dq);
    check(dq[39:8] == 32'h1357_9BDF, "data RAM kept over warm reboot");
    io_rd(4'h1, q);
    check(q[47:40] == 8'b1111_1000, $sformatf("no trip flag after ~V_FAIL %b", q[47:40]));

    // reboot 2: watchdog time-out (restarted twice first)
    io_wr(4'h1, {8'b1010_1111, 40'h0});
    repeat (WDS / 2) @(negedge clk); io_wr(4'h1, {8'b1010_1111, 40'h0});
    repeat (WDS / 2) @(negedge clk); io_wr(4'h1, {8'b1010_1111, 40'h0});
    check(n_wd_trip == 0, "restarted watchdog does not trip");
    wait_boot();
    check_loader("after watchdog trip");
    io_rd(4'h1, q);
    check(q[47:40] == 8'b0011_1000, $sformatf("trip flag after watchdog reboot %b", q[47:40]));
    io_wr(4'h1, {8'b0111_1111, 40'h0});

    // reboot 3: two single-byte 0xF5 commands
    p = '{8'hF5};
    send_cmd(p, 0);
    send_cmd(p, 0);
    wait_boot();
    io_rd(4'h1, q);
    check(q[47:40] == 8'b1111_0000, $sformatf("~DC_Rst after discrete reset %b", q[47:40]));

    // every mechanism happened
    check(n_boot == 4, $sformatf("boots: %0d", n_boot));
    check(n_pm_held > 0, "PM access stretched by device");
    check(n_dm_held > 0, "DM access stretched by device");
    check(n_cmd_irq > 0, "command interrupt");
    check(n_md_irq == 1, "mission data interrupt once per packet");
    check(n_md_hold > 0, "sub-packet hold");
    check(n_busy_wait == 0, "no transmission while BUSY");
    check(n_ovr > 0 && n_biterr > 0, "overflow and bit error");
    check(n_vfail == 1 && n_wd_trip == 1 && n_dc == 1, "three warm reboot sources");
    check(n_od0 > 0 && n_prom > 0, "OD strobe and PROM read");
    $display("events: boots=%0d pm_held=%0d dm_held=%0d cmd_irq=%0d md_irq=%0d md_hold=%0d ovr=%0d biterr=%0d vfail=%0d wd=%0d dc=%0d od0=%0d prom=%0d",
             n_boot, n_pm_held, n_dm_held, n_cmd_irq, n_md_irq, n_md_hold, n_ovr, n_biterr, n_vfail, n_wd_trip, n_dc, n_od0, n_prom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
