// Self-checking test of tbus_ctl.  Backplane device models answer on the
// buffered PM and DM sides with data derived from the address and can
// stretch an access by holding their ack line low from the first clock of
// the strobe.  Checks the device select decode of both buses (CM_Ctl, MON,
// PROM; DMS1..3) and that on-board and RAM addresses are not buffered,
// the data lanes for reads and writes, the 4-clock minimum cycle, the
// stretched cycle when the device asserts its ack within two clocks, and
// that a late ack from the device is ignored.
module tb_tbus_ctl;
  logic clk = 0, rst_n = 0;
  logic [23:0] pm_addr = '0;  logic pm_rd = 0, pm_wr = 0;  logic [47:0] pm_wdata = '0;
  logic [31:0] dm_addr = '0;  logic dm_rd = 0, dm_wr = 0;  logic [39:0] dm_wdata = '0;
  logic pm_req, pm_ack, pm_held, dm_req, dm_ack, dm_held;
  logic [15:0] pm_rdata, dm_rdata;
  logic [23:0] bpm_addr, bdm_addr;
  logic [15:0] bpm_wdata, bdm_wdata, bpm_rdata, bdm_rdata;
  logic bpm_rd_n, bpm_wr_n, cm_sel_n, mon_sel_n, prom_ce_n, bdm_rd_n, bdm_wr_n;
  logic [3:1] dms_n;
  logic bpm_ack_n, bdm_ack_n;
  int checks = 0, failures = 0;

  // device models
  int hold_len = 0, hold_from = 1, pm_strobe = 0, dm_strobe = 0;
  logic [15:0] last_pm_w, last_dm_w;
  logic [2:0]  pm_sel_seen;
  logic [3:1]  dm_sel_seen;
  always @(posedge clk) begin
    pm_strobe <= (!bpm_rd_n || !bpm_wr_n) ? pm_strobe + 1 : 0;
    dm_strobe <= (!bdm_rd_n || !bdm_wr_n) ? dm_strobe + 1 : 0;
    if (!bpm_wr_n) last_pm_w <= bpm_wdata;
    if (!bdm_wr_n) last_dm_w <= bdm_wdata;
    if (!bpm_rd_n || !bpm_wr_n) pm_sel_seen <= {prom_ce_n, mon_sel_n, cm_sel_n};
    if (!bdm_rd_n || !bdm_wr_n) dm_sel_seen <= dms_n;
  end
  assign bpm_rdata = bpm_addr[15:0] ^ 16'h5A5A;
  assign bdm_rdata = bdm_addr[15:0] ^ 16'hC33C;
  assign bpm_ack_n = !((!bpm_rd_n || !bpm_wr_n) && pm_strobe + 1 >= hold_from
                       && pm_strobe + 1 < hold_from + hold_len);
  assign bdm_ack_n = !((!bdm_rd_n || !bdm_wr_n) && dm_strobe + 1 >= hold_from
                       && dm_strobe + 1 < hold_from + hold_len);

  tbus_ctl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one PM access; returns clocks taken and data read
  task automatic pm_acc(input logic [23:0] a, input bit w, input logic [15:0] d,
                        output int n, output logic [15:0] q);
    pm_addr = a; pm_rd = !w; pm_wr = w; pm_wdata = {16'hDEAD, d, 16'hBEEF};
    n = 0;
    do begin
      n++;
      #1 q = pm_rdata;
      if (pm_ack) begin @(negedge clk); break; end
      @(negedge clk);
    end while (n < 50);
    pm_rd = 0; pm_wr = 0;
  endtask
  task automatic dm_acc(input logic [31:0] a, input bit w, input logic [15:0] d,
                        output int n, output logic [15:0] q);
    dm_addr = a; dm_rd = !w; dm_wr = w; dm_wdata = {16'hDEAD, d, 8'hEF};
    n = 0;
    do begin
      n++;
      #1 q = dm_rdata;
      if (dm_ack) begin @(negedge clk); break; end
      @(negedge clk);
    end while (n < 50);
    dm_rd = 0; dm_wr = 0;
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n; logic [15:0] q;
    automatic logic [23:0] pa[3] = '{24'h80_0123, 24'hA0_0004, 24'hE0_0ABC};
    automatic logic [31:0] da[3] = '{32'h0100_1234, 32'h0200_0042, 32'h0300_0F0F};
    repeat (3) @(negedge clk);
    rst_n = 1; @(negedge clk);

    pm_addr = 24'hC0_0002; #1 check(!pm_req, "TWIB ports not buffered");
    pm_addr = 24'h00_1000; #1 check(!pm_req, "program RAM not buffered");
    dm_addr = 32'h0000_1000; #1 check(!dm_req, "data RAM not buffered");

    foreach (pa[i]) begin
      pm_acc(pa[i], 0, 16'h0, n, q);
      check(n == 4, $sformatf("PM read %h took %0d clocks", pa[i], n));
      check(q == (pa[i][15:0] ^ 16'h5A5A), "PM read data");
      check(pm_sel_seen == ~(3'b001 << i), $sformatf("PM select %b", pm_sel_seen));
      pm_acc(pa[i], 1, 16'(16'h1111 * (i + 1)), n, q);
      check(n == 4 && last_pm_w == 16'(16'h1111 * (i + 1)), "PM write lane PMD[31:16]");
    end
    foreach (da[i]) begin
      dm_acc(da[i], 0, 16'h0, n, q);
      check(n == 4, $sformatf("DM read %h took %0d clocks", da[i], n));
      check(q == (da[i][15:0] ^ 16'hC33C), "DM read data");
      check(dm_sel_seen == ~(3'b001 << i), $sformatf("DM select %b", dm_sel_seen));
      dm_acc(da[i], 1, 16'(16'h2222 * (i + 1)), n, q);
      check(n == 4 && last_dm_w == 16'(16'h2222 * (i + 1)), "DM write lane DMD[23:8]");
    end

    // device holds its ack from the first strobe clock for 6 clocks
    hold_from = 1; hold_len = 6;
    pm_acc(24'h80_0010, 0, 16'h0, n, q);
    check(n == 8, $sformatf("PM cycle stretched to %0d clocks", n));
    check(q == (16'h0010 ^ 16'h5A5A), "stretched PM read data");
    dm_acc(32'h0300_0020, 1, 16'h7777, n, q);
    check(n == 8 && last_dm_w == 16'h7777, $sformatf("DM cycle stretched to %0d clocks", n));
    // second strobe clock still counts; the third is too late
    hold_from = 2; hold_len = 10;
    pm_acc(24'hA0_0001, 0, 16'h0, n, q);
    check(n == 13, $sformatf("ack in second clock stretches (%0d)", n));
    hold_from = 3; hold_len = 10;
    pm_acc(24'hA0_0001, 0, 16'h0, n, q);
    check(n == 4, $sformatf("late device ack ignored (%0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
