// TBUS_CTL: bus retiming and buffering FPGA (Actel_46).
//
// Puts the slow and off-board devices behind registered buffers: the boot
// PROM and the backplane cards on the program memory (PM) bus, and the
// backplane data memory banks on the data memory (DM) bus.  Each bus has
// its own tbus_cycle channel, so every access to those spaces takes at
// least four clocks (200 ns) and may be stretched by the device through
// its ~PMACK_B / ~DMACK_B line.  Buffered devices are 16 bits wide: they
// sit on PMD[31:16] and DMD[23:8] of the processor buses; the PROM uses
// PMD[23:16], the low byte of the PM lane.
//
// PM decode on PMA[23:21]: 100 CM_Ctl ports, 101 MON ports, 111 PROM
// (110, the SC_PROC ports, are served on board by TWIB_CTL and are not
// buffered).  DM decode on DMA[31:24]: 01 CCD buffer (DMS1), 02 unused
// bank (DMS2), 03 EEPROM (DMS3).  Accesses to the unused DM bank end
// after the minimum cycle with undefined data.
// Interface: pm_* / dm_* are the processor side with active-high strobes;
// pm_ack / dm_ack go high in the clock that ends a buffered access and are
// only meaningful while pm_req / dm_req are high.
module tbus_ctl (
  input  logic        clk,
  input  logic        rst_n,
  // processor PM bus
  input  logic [23:0] pm_addr,
  input  logic        pm_rd,
  input  logic        pm_wr,
  input  logic [47:0] pm_wdata,
  output logic        pm_req,        // address is in the buffered PM space
  output logic [15:0] pm_rdata,      // for PMD[31:16]
  output logic        pm_ack,
  output logic        pm_held,
  // processor DM bus
  input  logic [31:0] dm_addr,
  input  logic        dm_rd,
  input  logic        dm_wr,
  input  logic [39:0] dm_wdata,
  output logic        dm_req,        // address is in the buffered DM space
  output logic [15:0] dm_rdata,      // for DMD[23:8]
  output logic        dm_ack,
  output logic        dm_held,
  // buffered PM side
  output logic [23:0] bpm_addr,
  output logic [15:0] bpm_wdata,
  output logic        bpm_rd_n,
  output logic        bpm_wr_n,
  output logic        cm_sel_n,
  output logic        mon_sel_n,
  output logic        prom_ce_n,
  input  logic [15:0] bpm_rdata,
  input  logic        bpm_ack_n,
  // buffered DM side
  output logic [23:0] bdm_addr,
  output logic [15:0] bdm_wdata,
  output logic        bdm_rd_n,
  output logic        bdm_wr_n,
  output logic [3:1]  dms_n,
  input  logic [15:0] bdm_rdata,
  input  logic        bdm_ack_n
);
  import sc_proc_pkg::*;

  logic [2:0] pm_sel_n;
  logic [2:0] dm_sel_n;

  always_comb begin
    pm_sel_n = 3'b111;
    unique case (pm_addr[23:21])
      PMA_CM:   pm_sel_n[0] = 1'b0;
      PMA_MON:  pm_sel_n[1] = 1'b0;
      PMA_PROM: pm_sel_n[2] = 1'b0;
      default:  ;
    endcase
  end
  assign pm_req = !(&pm_sel_n);

  always_comb begin
    dm_sel_n = 3'b111;
    unique case (dm_addr[31:24])
      8'h01:   dm_sel_n[0] = 1'b0;
      8'h02:   dm_sel_n[1] = 1'b0;
      8'h03:   dm_sel_n[2] = 1'b0;
      default: ;
    endcase
  end
  assign dm_req = !(&dm_sel_n);

  tbus_cycle #(.AW(24), .SW(3), .MIN_CYC(4)) u_pm (
    .clk(clk), .rst_n(rst_n),
    .req(pm_req), .rd(pm_rd), .wr(pm_wr), .addr(pm_addr),
    .wdata(pm_wdata[31:16]), .sel_n(pm_sel_n),
    .rdata(pm_rdata), .ack(pm_ack), .held(pm_held),
    .b_addr(bpm_addr), .b_wdata(bpm_wdata), .b_rd_n(bpm_rd_n), .b_wr_n(bpm_wr_n),
    .b_sel_n({prom_ce_n, mon_sel_n, cm_sel_n}),
    .b_rdata(bpm_rdata), .b_ack_n(bpm_ack_n)
  );

  tbus_cycle #(.AW(24), .SW(3), .MIN_CYC(4)) u_dm (
    .clk(clk), .rst_n(rst_n),
    .req(dm_req), .rd(dm_rd), .wr(dm_wr), .addr(dm_addr[23:0]),
    .wdata(dm_wdata[23:8]), .sel_n(dm_sel_n),
    .rdata(dm_rdata), .ack(dm_ack), .held(dm_held),
    .b_addr(bdm_addr), .b_wdata(bdm_wdata), .b_rd_n(bdm_rd_n), .b_wr_n(bdm_wr_n),
    .b_sel_n(dms_n),
    .b_rdata(bdm_rdata), .b_ack_n(bdm_ack_n)
  );
endmodule
