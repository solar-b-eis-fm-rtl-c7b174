// Self-checking test of twib_ctl through its program memory bus port, with
// reduced sizes (16-word FIFOs, 4 clocks per serial bit, a 50-clock time
// tick, 400/800-clock watchdog, 8-tick discrete reset window).  MDP models
// drive the command link and receive the status and mission data links.
// Checks the three wait states of every port, the port decode and data
// lanes, time load and count, command reception with interrupt and FIFO
// read-out, status and mission data transmission, the OD strobes, the
// watchdog trip and the discrete reset by two 0xF5 commands, both ending
// in a warm reset that leaves the watchdog flags readable.
module tb_twib_ctl;
  localparam int TDIV = 50;
  logic clk = 0, por_n = 0;
  logic [23:0] pm_addr = '0;
  logic pm_rd = 0, pm_wr = 0;
  logic [47:0] pm_wdata = '0, pm_rdata;
  logic pm_req, pm_ack;
  logic cmd_ena = 0, cmd_clk = 0, cmd_data = 0, md_busy = 0, v_fail_n = 1;
  logic st_ena, st_clk, st_data, md_ena, md_clk, md_data;
  logic wrm_rst_n, cmd_irq_n, md_irq_n, od0_n, od1_n, wd_trip, dc_req;
  logic rst_n;
  int checks = 0, failures = 0, od0 = 0, od1 = 0;

  assign rst_n = por_n && wrm_rst_n;

  twib_ctl #(.FIFO_DEPTH(16), .BIT_DIV(4), .TICK_DIV(TDIV), .WD_SHORT(400),
             .WD_LONG(800), .DC_WINDOW(8)) dut (.*);
  always #5 clk = ~clk;

  // serial receivers
  logic [7:0] st_rx[$];  logic [15:0] md_rx[$];
  logic [7:0] st_sh;     logic [15:0] md_sh;
  int st_n = 0, md_n = 0;
  logic st_clk_q = 0, md_clk_q = 0;
  always @(posedge clk) begin
    st_clk_q <= st_clk; md_clk_q <= md_clk;
    if (por_n && st_ena && st_clk && !st_clk_q) begin
      st_sh = {st_sh[6:0], st_data}; st_n++;
      if (st_n % 8 == 0) st_rx.push_back(st_sh);
    end
    if (por_n && md_ena && md_clk && !md_clk_q) begin
      md_sh = {md_sh[14:0], md_data}; md_n++;
      if (md_n % 16 == 0) md_rx.push_back(md_sh);
    end
    if (!od0_n) od0++;
    if (!od1_n) od1++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int last_n;
  task automatic acc(input logic [3:0] port, input bit w, input logic [47:0] d,
                     output logic [47:0] q);
    pm_addr = {3'b110, 17'h0ABC, port}; pm_rd = !w; pm_wr = w; pm_wdata = d;
    last_n = 0;
    do begin
      last_n++;
      #1 q = pm_rdata;
      if (pm_ack) begin @(negedge clk); break; end
      @(negedge clk);
    end while (last_n < 50);
    pm_rd = 0; pm_wr = 0;
    check(last_n == 4, $sformatf("port %0d access took %0d clocks", port, last_n));
  endtask
  task automatic wr(input logic [3:0] port, input logic [47:0] d);
    logic [47:0] q; acc(port, 1, d, q);
  endtask
  task automatic rd(input logic [3:0] port, output logic [47:0] q);
    acc(port, 0, '0, q);
  endtask
  task automatic flags(input logic [3:0] port, input logic [7:0] f);
    wr(port, {f, 40'h0});
  endtask

  task automatic send_cmd(input logic [7:0] bytes[$]);
    cmd_ena = 1; repeat (3) @(negedge clk);
    foreach (bytes[i]) for (int k = 7; k >= 0; k--) begin
      cmd_data = bytes[i][k]; repeat (3) @(negedge clk);
      cmd_clk = 1; repeat (3) @(negedge clk); cmd_clk = 0;
    end
    repeat (3) @(negedge clk); cmd_ena = 0; repeat (6) @(negedge clk);
  endtask

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [47:0] q;
    logic [7:0] p[$];
    repeat (3) @(negedge clk);
    por_n = 1; repeat (3) @(negedge clk);
    pm_addr = 24'hE0_0000; #1 check(!pm_req, "PROM space is not a TWIB port");

    // spacecraft time
    wr(4'h0, {32'hCAFE_0000, 16'h0});
    rd(4'h0, q);
    check(q[47:16] == 32'hCAFE_0000 && q[15:0] == 0, "time read back on PMD[47:16]");
    repeat (3 * TDIV) @(negedge clk);
    rd(4'h0, q);
    check(q[47:16] == 32'hCAFE_0003, $sformatf("time after three ticks %h", q[47:16]));

    // watchdog status after power-on
    rd(4'h1, q);
    check(q[47:40] == 8'b1111_1000, $sformatf("watchdog flags %b", q[47:40]));

    // command packet of four bytes
    p = '{8'h11, 8'h22, 8'h33, 8'h44};
    send_cmd(p);
    check(!cmd_irq_n, "command interrupt");
    rd(4'h2, q);
    check(q[47:40] == 8'b0110_1110, $sformatf("command status %b", q[47:40]));
    rd(4'h3, q);
    check(q[47:21] == {1'b0, 8'h11, 1'b0, 8'h22, 1'b0, 8'h33} && q[20:0] == 0, "command word 1");
    rd(4'h3, q);
    check(q[47:21] == {1'b1, 8'h44, 18'h0}, "command word 2 with EOC");
    flags(4'h2, 8'b1110_1111);
    check(cmd_irq_n, "command interrupt cleared");

    // status packet
    wr(4'h5, {24'h0, 8'hA5, 16'h0}); wr(4'h5, {24'h0, 8'h3C, 16'h0});
    flags(4'h4, 8'b0111_1111);
    while (st_rx.size() < 2 && last_n < 50) @(negedge clk);
    repeat (5) @(negedge clk);
    check(st_rx.size() == 2 && st_rx[0] == 8'hA5 && st_rx[1] == 8'h3C, "status packet sent");
    rd(4'h4, q);
    check(q[47:40] == 8'b1000_0010, $sformatf("status interface idle %b", q[47:40]));

    // mission data, single sub-packet
    wr(4'h7, {16'h0, 16'hBEEF, 16'h0}); wr(4'h7, {16'h0, 16'h1234, 16'h0});
    flags(4'h6, 8'b1111_1001);           // ~EOP = 0, ~GO = 0
    while (md_irq_n) @(negedge clk);
    check(md_rx.size() == 2 && md_rx[0] == 16'hBEEF && md_rx[1] == 16'h1234, "mission data sent");
    rd(4'h6, q);
    check(q[47:40] == 8'b0100_0010, $sformatf("mission data status %b", q[47:40]));
    flags(4'h6, 8'b1111_0011);
    check(md_irq_n, "mission data interrupt cleared");

    // OD strobes and a free port
    wr(4'h8, 48'h1); wr(4'h9, 48'h2); wr(4'h9, 48'h3);
    check(od0 == 1 && od1 == 2, "OD strobes");
    rd(4'hC, q);
    check(q == 0, "free port reads zero");

    // watchdog trip: enable, short time-out, then stop restarting it
    flags(4'h1, 8'b1010_1111);
    while (wrm_rst_n) @(negedge clk);
    while (!wrm_rst_n) @(negedge clk);
    rd(4'h1, q);
    check(q[47:40] == 8'b0011_1000, $sformatf("watchdog tripped %b", q[47:40]));
    rd(4'h0, q);
    check(q[47:16] < 32'd50, "time cleared by the warm reboot");
    flags(4'h1, 8'b0111_1111);           // clear trip, disable

    // discrete reset: two single 0xF5 commands
    p = '{8'hF5};
    send_cmd(p);
    check(wrm_rst_n, "one 0xF5 does nothing");
    send_cmd(p);
    while (!wrm_rst_n) @(negedge clk);
    rd(4'h1, q);
    check(q[47:40] == 8'b1111_0000, $sformatf("discrete reset flag %b", q[47:40]));
    rd(4'h2, q);
    check(q[42] == 1'b0, "command FIFO emptied by the warm reboot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
