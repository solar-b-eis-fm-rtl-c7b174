// TWIB_CTL: time, watchdog, interfaces and boot control FPGA (Actel_45).
//
// Holds the I/O ports of the processor board in program memory space at
// 0xC0 000x (PMA[23:21] = 110, PMA[3:0] = port, PMA[20:4] ignored) and the
// units behind them: spacecraft time (sc_time), watchdog (watchdog), the
// discrete reset detector (dc_rst) and the three MDP links, command
// (cmd_if), status (st_if) and mission data (md_if).  Every port access
// takes three wait states: ack rises in the fourth clock of the access and
// the write, or the FIFO pop of a data read, happens on that clock edge.
//
// Port map and data lanes on the 48-bit PM data bus:
//   0 SCTIME   rd/wr  time on PMD[47:16]
//   1 WD       rd/wr  flags on PMD[47:43]
//   2 CMD_CTL  rd/wr  flags on PMD[47:40]
//   3 CMD_DAT  rd     27-bit FIFO word on PMD[47:21]
//   4 ST_CTL   rd/wr  flags on PMD[47:40]
//   5 ST_DAT   wr     byte on PMD[23:16]
//   6 MD_CTL   rd/wr  flags on PMD[47:40]
//   7 MD_DAT   wr     word on PMD[31:16]
//   8 OD0, 9 OD1 wr   od0_n / od1_n pulse low for one clock so the test
//                     board latches PMD[47:16]
// Other ports read as zero.  Interrupts: cmd_irq_n is ~IRQ3, md_irq_n is
// ~IRQ0.  wrm_rst_n is the warm reboot from the watchdog; the watchdog
// flags see only por_n, everything else the board reset rst_n.
// Decode, wait states and lanes follow the board's port map; lanes not
// given there (SCTIME, OD) are this design's choice of PMD[47:16].
module twib_ctl #(
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned BIT_DIV    = 20,
  parameter int unsigned TICK_DIV   = 39_062,
  parameter int unsigned WD_SHORT   = 155_600_000,
  parameter int unsigned WD_LONG    = 311_200_000,
  parameter int unsigned DC_WINDOW  = 8192
) (
  input  logic        clk,
  input  logic        por_n,
  input  logic        rst_n,
  // processor PM bus
  input  logic [23:0] pm_addr,
  input  logic        pm_rd,
  input  logic        pm_wr,
  input  logic [47:0] pm_wdata,
  output logic        pm_req,
  output logic [47:0] pm_rdata,
  output logic        pm_ack,
  // MDP links
  input  logic        cmd_ena,
  input  logic        cmd_clk,
  input  logic        cmd_data,
  output logic        st_ena,
  output logic        st_clk,
  output logic        st_data,
  input  logic        md_busy,
  output logic        md_ena,
  output logic        md_clk,
  output logic        md_data,
  // board
  input  logic        v_fail_n,
  output logic        wrm_rst_n,
  output logic        cmd_irq_n,
  output logic        md_irq_n,
  output logic        od0_n,
  output logic        od1_n,
  // event strobes for monitoring
  output logic        wd_trip,
  output logic        dc_req
);
  import sc_proc_pkg::*;

  // ------------------------------------------------------------ decode
  logic [1:0] ws;
  logic       acc, wstb, rstb;
  io_reg_e    port;

  assign pm_req = (pm_addr[23:21] == PMA_IO);
  assign acc    = pm_req && (pm_rd || pm_wr);
  assign pm_ack = acc && (ws == 2'd3);
  assign wstb   = pm_ack && pm_wr;
  assign rstb   = pm_ack && pm_rd;
  assign port   = io_reg_e'(pm_addr[3:0]);

  always_ff @(posedge clk) begin
    if (!rst_n)      ws <= '0;
    else if (pm_ack) ws <= '0;
    else if (acc)    ws <= ws + 1'b1;
    else             ws <= '0;
  end

  logic [7:0] flags_w;
  assign flags_w = pm_wdata[47:40];

  // ------------------------------------------------------------ units
  logic        tick;
  logic [31:0] sctime;
  logic [7:0]  wd_stat, cmd_stat, st_stat, md_stat;
  logic [26:0] cmd_word;
  logic        single_cmd;
  logic [7:0]  single_byte;

  sc_time #(.TICK_DIV(TICK_DIV)) u_time (
    .clk(clk), .por_n(por_n), .rst_n(rst_n),
    .wr(wstb && port == REG_SCTIME), .wdata(pm_wdata[47:16]),
    .time_o(sctime), .tick(tick)
  );

  watchdog #(.TO_SHORT(WD_SHORT), .TO_LONG(WD_LONG)) u_wd (
    .clk(clk), .por_n(por_n),
    .ctl_wr(wstb && port == REG_WD), .ctl_wdata(flags_w), .stat(wd_stat),
    .v_fail_n(v_fail_n), .dc_req(dc_req), .wrm_rst_n(wrm_rst_n),
    .wd_trip(wd_trip)
  );

  cmd_if #(.FIFO_DEPTH(FIFO_DEPTH)) u_cmd (
    .clk(clk), .rst_n(rst_n),
    .cmd_ena(cmd_ena), .cmd_clk(cmd_clk), .cmd_data(cmd_data),
    .ctl_wr(wstb && port == REG_CMD_CTL), .ctl_wdata(flags_w), .stat(cmd_stat),
    .dat_rd(rstb && port == REG_CMD_DAT), .dat_rdata(cmd_word),
    .irq_n(cmd_irq_n), .single_cmd(single_cmd), .single_byte(single_byte)
  );

  dc_rst #(.WINDOW(DC_WINDOW)) u_dc (
    .clk(clk), .rst_n(rst_n), .tick(tick),
    .single_cmd(single_cmd), .single_byte(single_byte), .req(dc_req)
  );

  st_if #(.FIFO_DEPTH(FIFO_DEPTH), .BIT_DIV(BIT_DIV)) u_st (
    .clk(clk), .rst_n(rst_n),
    .ctl_wr(wstb && port == REG_ST_CTL), .ctl_wdata(flags_w), .stat(st_stat),
    .dat_wr(wstb && port == REG_ST_DAT), .dat_wdata(pm_wdata[23:16]),
    .st_ena(st_ena), .st_clk(st_clk), .st_data(st_data)
  );

  md_if #(.FIFO_DEPTH(FIFO_DEPTH), .BIT_DIV(BIT_DIV)) u_md (
    .clk(clk), .rst_n(rst_n),
    .ctl_wr(wstb && port == REG_MD_CTL), .ctl_wdata(flags_w), .stat(md_stat),
    .dat_wr(wstb && port == REG_MD_DAT), .dat_wdata(pm_wdata[31:16]),
    .md_busy(md_busy), .md_ena(md_ena), .md_clk(md_clk), .md_data(md_data),
    .irq_n(md_irq_n)
  );

  assign od0_n = !(wstb && port == REG_OD0);
  assign od1_n = !(wstb && port == REG_OD1);

  // ------------------------------------------------------------ read mux
  always_comb begin
    pm_rdata = '0;
    unique case (port)
      REG_SCTIME:  pm_rdata[47:16] = sctime;
      REG_WD:      pm_rdata[47:40] = wd_stat;
      REG_CMD_CTL: pm_rdata[47:40] = cmd_stat;
      REG_CMD_DAT: pm_rdata[47:21] = cmd_word;
      REG_ST_CTL:  pm_rdata[47:40] = st_stat;
      REG_MD_CTL:  pm_rdata[47:40] = md_stat;
      default:     ;
    endcase
  end
endmodule
