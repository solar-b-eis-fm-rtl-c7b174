// Self-checking test of watchdog with time-outs reduced to 100 and 200
// clocks.  Checks the power-on flags, that a disabled watchdog never
// trips, that regular ~WD_RST writes keep an enabled one quiet, the exact
// time-out for both ~WDTToSel settings (clocks from the last restart to
// the warm reset), the warm reset pulse length, that the flags survive the
// warm reboot, ~WDTripRst, the ~V_FAIL and discrete-reset trip sources
// with the ~V_Fail and ~DC_Rst flags, and that power-on reset clears all.
module tb_watchdog;
  localparam int SHORT = 100, LONG = 200, WRM = 16;
  logic clk = 0, por_n = 0, ctl_wr = 0, v_fail_n = 1, dc_req = 0;
  logic [7:0] ctl_wdata = 8'hFF, stat;
  logic wrm_rst_n, wd_trip;
  int checks = 0, failures = 0;

  watchdog #(.TO_SHORT(SHORT), .TO_LONG(LONG), .WRM_LEN(WRM)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic ctl(input logic [7:0] v);
    ctl_wr = 1; ctl_wdata = v; @(negedge clk); ctl_wr = 0; ctl_wdata = 8'hFF;
  endtask
  // clocks until the warm reset starts, and how long it lasts
  task automatic time_trip(output int to, output int len);
    to = 0; len = 0;
    while (wrm_rst_n && to < 10 * LONG) begin @(negedge clk); to++; end
    while (!wrm_rst_n && len < 10 * LONG) begin @(negedge clk); len++; end
  endtask

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int to, len;
    repeat (3) @(negedge clk);
    por_n = 1; repeat (3) @(negedge clk);
    check(stat == 8'b1111_1000, $sformatf("power-on flags %b", stat));
    repeat (3 * LONG) @(negedge clk);
    check(wrm_rst_n && stat[7], "disabled watchdog does not trip");

    ctl(8'b1010_1111);                  // enable, short time-out, restart
    check(!stat[6] && stat[5], "enabled, short time-out selected");
    for (int i = 0; i < 10; i++) begin
      repeat (SHORT / 2) @(negedge clk);
      ctl(8'b1010_1111);                // ~WD_RST = 0
    end
    check(wrm_rst_n && stat[7], "kept quiet by restarts");
    time_trip(to, len);
    check(to == SHORT, $sformatf("short time-out after %0d clocks", to));
    check(len == WRM, $sformatf("warm reset lasted %0d clocks", len));
    check(!stat[7] && !stat[6] && stat[5], "trip flag set, settings kept over reboot");
    ctl(8'b0000_1111);                  // ~WDTripRst, enabled, long time-out, restart
    check(stat[7] && !stat[5], "trip flag cleared, long time-out selected");
    time_trip(to, len);
    check(to == LONG, $sformatf("long time-out after %0d clocks", to));
    ctl(8'b0111_1111);                  // clear trip, disable
    check(stat[7] && stat[6], "cleared and disabled");

    v_fail_n = 0;
    repeat (4) @(negedge clk);
    check(!stat[4] && !wrm_rst_n && stat[7], "~V_FAIL holds warm reset, no trip flag");
    v_fail_n = 1;
    time_trip(to, len);
    check(wrm_rst_n && stat[4], "~V_FAIL released");

    dc_req = 1; @(negedge clk); dc_req = 0;
    check(!stat[3] && !wrm_rst_n, "discrete reset request");
    repeat (2 * WRM) @(negedge clk);
    check(!stat[3] && wrm_rst_n, "~DC_Rst kept after reboot");
    ctl(8'b0111_1111);
    check(stat[3], "~DC_Rst cleared by ~WDTripRst");

    ctl(8'b1001_1111);
    por_n = 0; @(negedge clk); por_n = 1; @(negedge clk);
    check(stat == 8'b1111_1000, "power-on reset clears the settings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
