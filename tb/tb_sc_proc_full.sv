// Test of the SC_PROC board (sc_proc) with every parameter at its default:
// 128k-word RAMs, 4k FIFOs, 20 clocks per serial bit, the 39062-clock
// (512 Hz) time tick and a 256-instruction boot loader.  It runs one
// complete operation of the board: power-on boot from PROM (timed and
// checked word by word in program RAM), RAM accesses at the top of both
// memories, a command packet received by interrupt and read out, the
// matching status packet and a mission data packet sent to the MDP, and
// one tick of spacecraft time.  The watchdog, at 7.78 s, is only enabled
// and restarted here; its trip is covered at reduced size elsewhere.
module tb_sc_proc_full;
  localparam int BOOT = 256, TICK = 39_062;

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
  logic [7:0] st_sh; logic [15:0] md_sh; int st_n = 0, md_n = 0, md_ena_clocks = 0;
  logic st_clk_q = 0, md_clk_q = 0;
  always @(posedge clk) begin
    st_clk_q <= st_clk; md_clk_q <= md_clk;
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
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] q, exp; logic [39:0] dq; logic [7:0] p[$];
    int t0;
    repeat (3) @(negedge clk);
    por_n = 1;
    t0 = 0;
    while (!dsp_reset_n && t0 < 100000) begin @(negedge clk); t0++; end
    check(t0 == BOOT * (6 * 4 + 1), $sformatf("boot took %0d clocks", t0));
    repeat (2) @(negedge clk);
    for (int i = 0; i < BOOT; i++) begin
      for (int b = 0; b < 6; b++) exp[47-8*b -: 8] = 8'(((6 * i + b) * 37 + 11) % 256);
      pm(24'(i), 0, '0, q);
      check(q == exp, $sformatf("loader word %0d", i));
    end
    pm(24'(BOOT), 0, '0, q);
    pm(24'h01_FFFF, 1, 48'hA5A5_5A5A_F00F, q);
    pm(24'h01_FFFF, 0, '0, q);
    check(q == 48'hA5A5_5A5A_F00F, "top of program RAM");
    dm(32'h0001_FFFF, 1, {32'h8765_4321, 8'h0}, dq);
    dm(32'h0001_FFFF, 0, '0, dq);
    check(dq[39:8] == 32'h8765_4321, "top of data RAM");

    io_wr(4'h1, {8'b1010_1111, 40'h0});     // enable watchdog (7.78 s)
    io_wr(4'h0, {32'd1000, 16'h0});          // load time

    p = '{8'hA0, 8'h01, 8'h02, 8'h03};
    send_cmd(p);
    check(!irq_n[3], "command interrupt");
    io_rd(4'h3, q); check(q[47:21] == {1'b0, 8'hA0, 1'b0, 8'h01, 1'b0, 8'h02}, "command word 1");
    io_rd(4'h3, q); check(q[47:21] == {1'b1, 8'h03, 18'h0}, "command word 2");
    io_wr(4'h2, {8'b1110_1111, 40'h0});
    check(irq_n[3], "command interrupt cleared");

    for (int i = 0; i < 8; i++) io_wr(4'h5, {24'h0, 8'(8'h80 + i), 16'h0});
    io_wr(4'h4, {8'b0111_1111, 40'h0});
    for (int i = 0; i < 64; i++) io_wr(4'h7, {16'h0, 16'(i * 1021), 16'h0});
    io_wr(4'h6, {8'b1111_0001, 40'h0});
    while (irq_n[0]) @(negedge clk);
    check(md_ena_clocks == 64 * 16 * 20 + 1, $sformatf("mission data took %0d clocks", md_ena_clocks));
    check(md_rx.size() == 64, "mission data length");
    foreach (md_rx[i]) check(md_rx[i] == 16'(i * 1021), "mission data word");
    check(st_rx.size() == 8, "status packet length");
    foreach (st_rx[i]) check(st_rx[i] == 8'(8'h80 + i), $sformatf("status byte %0d = %h", i, st_rx[i]));

    io_wr(4'h1, {8'b1010_1111, 40'h0});     // restart watchdog
    repeat (TICK) @(negedge clk);
    io_rd(4'h0, q);
    check(q[47:16] == 32'd1001 || q[47:16] == 32'd1002, $sformatf("time %0d after one tick", q[47:16]));
    io_rd(4'h1, q);
    check(q[47:40] == 8'b1011_1000 && wrm_rst_n, $sformatf("watchdog running, no trip %b", q[47:40]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
