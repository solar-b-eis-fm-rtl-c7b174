// SC_PROC: spacecraft interface and processor board of the EIS instrument
// control unit.
//
// The board is built around a 20 MHz TSC21020F DSP (outside this RTL: its
// buses are the ports pm_*/dm_*).  The program memory (PM) bus carries the
// 128k x 48 program RAM (bank 0, no wait states), the on-board I/O ports of
// TWIB_CTL at 0xC0 000x (three wait states), and, through the TBUS_CTL
// buffers, the backplane cards and the boot PROM at 0xE0 0000.  The data
// memory (DM) bus carries the 128k x 32 data RAM (bank 0) and, through
// TBUS_CTL, the backplane DM banks 1 to 3.
//
// Reset and boot: por_n is the power-on reset.  The board reset is
// por_n AND the watchdog's warm reboot.  While it is low, and afterwards
// until boot_ctl has copied the boot loader from PROM to program RAM,
// dsp_reset_n holds the DSP and boot_ctl drives the PM bus in its place.
//
// Interrupts (active low, priority 3 highest): irq_n[3] command packet
// received, irq_n[2] MHC and irq_n[1] ROE UART bytes (inputs from other
// cards, passed through), irq_n[0] mission data packet sent.
//
// Bus protocol on the processor side (both buses): an access is held with
// address, strobe (active low) and write data until the clock edge at
// which pm_ack/dm_ack is high; read data is valid in that clock.  Reads of
// unused space return zero with no wait.  Data lanes: program RAM
// PMD[47:0], buffered PM devices PMD[31:16], data RAM DMD[39:8], buffered
// DM devices DMD[23:8].  The boot PROM, which is not part of this RTL,
// answers on prom_d when prom_ce_n is low.  The OD test port carries the
// unbuffered PMD[47:16] (od_pmd) with the strobes od0_n/od1_n and the
// board reset wrm_rst_n, low at power-on and during every warm reboot.
module sc_proc #(
  parameter int unsigned RAM_WORDS  = 131072,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned BIT_DIV    = 20,
  parameter int unsigned TICK_DIV   = 39_062,
  parameter int unsigned WD_SHORT   = 155_600_000,
  parameter int unsigned WD_LONG    = 311_200_000,
  parameter int unsigned DC_WINDOW  = 8192,
  parameter int unsigned BOOT_WORDS = 256
) (
  input  logic        clk,
  input  logic        por_n,
  // DSP
  output logic        dsp_reset_n,
  output logic [3:0]  irq_n,
  input  logic [23:0] pma,
  input  logic        pmrd_n,
  input  logic        pmwr_n,
  input  logic [47:0] pmd_o,        // written by the DSP
  output logic [47:0] pmd_i,        // read by the DSP
  output logic        pmack,
  input  logic [31:0] dma,
  input  logic        dmrd_n,
  input  logic        dmwr_n,
  input  logic [39:0] dmd_o,
  output logic [39:0] dmd_i,
  output logic        dmack,
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
  // other cards
  input  logic        v_fail_n,
  input  logic        mhc_irq_n,
  input  logic        roe_irq_n,
  // buffered PM side (backplane and boot PROM)
  output logic [23:0] bpm_addr,
  output logic [15:0] bpm_wdata,
  output logic        bpm_rd_n,
  output logic        bpm_wr_n,
  output logic        cm_sel_n,
  output logic        mon_sel_n,
  output logic        prom_ce_n,
  input  logic [15:0] bpm_rdata,
  input  logic        bpm_ack_n,
  input  logic [7:0]  prom_d,
  // buffered DM side
  output logic [23:0] bdm_addr,
  output logic [15:0] bdm_wdata,
  output logic        bdm_rd_n,
  output logic        bdm_wr_n,
  output logic [3:1]  dms_n,
  input  logic [15:0] bdm_rdata,
  input  logic        bdm_ack_n,
  // OD test port
  output logic [47:16] od_pmd,
  output logic        od0_n,
  output logic        od1_n,
  output logic        wrm_rst_n,
  // event strobes for monitoring
  output logic        wd_trip,
  output logic        dc_req,
  output logic        pm_held,
  output logic        dm_held
);
  import sc_proc_pkg::*;

  localparam int unsigned RAW = $clog2(RAM_WORDS);

  // Board reset: power-on or warm reboot.  It is also brought out on the
  // OD test port as ~WRM_RST so the test board is reset with the board.
  logic rst_n, wd_rst_n;
  assign rst_n     = por_n && wd_rst_n;
  assign wrm_rst_n = rst_n;

  // ------------------------------------------------------------ PM master
  logic        boot_busy;
  logic [23:0] b_addr;
  logic        b_rd, b_wr;
  logic [47:0] b_wdata;

  logic [23:0] m_addr;
  logic        m_rd, m_wr;
  logic [47:0] m_wdata, m_rdata;
  logic        m_ack;

  assign m_addr  = boot_busy ? b_addr  : pma;
  assign m_rd    = boot_busy ? b_rd    : !pmrd_n;
  assign m_wr    = boot_busy ? b_wr    : !pmwr_n;
  assign m_wdata = boot_busy ? b_wdata : pmd_o;

  boot_ctl #(.BOOT_WORDS(BOOT_WORDS)) u_boot (
    .clk(clk), .rst_n(rst_n), .dsp_rst_n(dsp_reset_n), .busy(boot_busy),
    .m_addr(b_addr), .m_rd(b_rd), .m_wr(b_wr), .m_wdata(b_wdata),
    .m_rdata(m_rdata), .m_ack(m_ack)
  );

  // ------------------------------------------------------------ PM slaves
  logic        pram_sel;
  logic [47:0] pram_q;
  assign pram_sel = (m_addr[23:21] == PMA_RAM) && (m_addr[20:0] < 21'(RAM_WORDS));

  prog_ram #(.WORDS(RAM_WORDS)) u_pram (
    .clk(clk), .cs(pram_sel && (m_rd || m_wr)), .we(m_wr),
    .addr(m_addr[RAW-1:0]), .wdata(m_wdata), .rdata(pram_q)
  );

  logic        io_req, io_ack;
  logic [47:0] io_q;
  logic        cmd_irq_n, md_irq_n;

  twib_ctl #(
    .FIFO_DEPTH(FIFO_DEPTH), .BIT_DIV(BIT_DIV), .TICK_DIV(TICK_DIV),
    .WD_SHORT(WD_SHORT), .WD_LONG(WD_LONG), .DC_WINDOW(DC_WINDOW)
  ) u_twib (
    .clk(clk), .por_n(por_n), .rst_n(rst_n),
    .pm_addr(m_addr), .pm_rd(m_rd), .pm_wr(m_wr), .pm_wdata(m_wdata),
    .pm_req(io_req), .pm_rdata(io_q), .pm_ack(io_ack),
    .cmd_ena(cmd_ena), .cmd_clk(cmd_clk), .cmd_data(cmd_data),
    .st_ena(st_ena), .st_clk(st_clk), .st_data(st_data),
    .md_busy(md_busy), .md_ena(md_ena), .md_clk(md_clk), .md_data(md_data),
    .v_fail_n(v_fail_n), .wrm_rst_n(wd_rst_n),
    .cmd_irq_n(cmd_irq_n), .md_irq_n(md_irq_n),
    .od0_n(od0_n), .od1_n(od1_n), .wd_trip(wd_trip), .dc_req(dc_req)
  );

  logic        tpm_req, tpm_ack, tdm_req, tdm_ack;
  logic [15:0] tpm_q, tdm_q, bpm_in;
  logic        d_rd, d_wr;
  assign d_rd = !dmrd_n;
  assign d_wr = !dmwr_n;

  // The boot PROM drives the low byte of the buffered PM lane.
  assign bpm_in = prom_ce_n ? bpm_rdata : {8'h00, prom_d};

  tbus_ctl u_tbus (
    .clk(clk), .rst_n(rst_n),
    .pm_addr(m_addr), .pm_rd(m_rd), .pm_wr(m_wr), .pm_wdata(m_wdata),
    .pm_req(tpm_req), .pm_rdata(tpm_q), .pm_ack(tpm_ack), .pm_held(pm_held),
    .dm_addr(dma), .dm_rd(d_rd), .dm_wr(d_wr), .dm_wdata(dmd_o),
    .dm_req(tdm_req), .dm_rdata(tdm_q), .dm_ack(tdm_ack), .dm_held(dm_held),
    .bpm_addr(bpm_addr), .bpm_wdata(bpm_wdata), .bpm_rd_n(bpm_rd_n),
    .bpm_wr_n(bpm_wr_n), .cm_sel_n(cm_sel_n), .mon_sel_n(mon_sel_n),
    .prom_ce_n(prom_ce_n), .bpm_rdata(bpm_in), .bpm_ack_n(bpm_ack_n),
    .bdm_addr(bdm_addr), .bdm_wdata(bdm_wdata), .bdm_rd_n(bdm_rd_n),
    .bdm_wr_n(bdm_wr_n), .dms_n(dms_n), .bdm_rdata(bdm_rdata),
    .bdm_ack_n(bdm_ack_n)
  );

  always_comb begin
    m_rdata = '0;
    m_ack   = 1'b1;
    if (io_req) begin
      m_rdata = io_q;
      m_ack   = io_ack;
    end else if (tpm_req) begin
      m_rdata[31:16] = tpm_q;
      m_ack          = tpm_ack;
    end else if (pram_sel) begin
      m_rdata = pram_q;
    end
  end

  assign pmd_i = m_rdata;
  assign pmack = boot_busy ? 1'b0 : m_ack;

  // ------------------------------------------------------------ DM bus
  logic        dram_sel;
  logic [31:0] dram_q;
  assign dram_sel = (dma[31:24] == 8'h00) && (dma[23:0] < 24'(RAM_WORDS));

  data_ram #(.WORDS(RAM_WORDS)) u_dram (
    .clk(clk), .cs(dram_sel && (d_rd || d_wr)), .we(d_wr),
    .addr(dma[RAW-1:0]), .wdata(dmd_o[39:8]), .rdata(dram_q)
  );

  always_comb begin
    dmd_i = '0;
    dmack = 1'b1;
    if (tdm_req) begin
      dmd_i[23:8] = tdm_q;
      dmack       = tdm_ack;
    end else if (dram_sel) begin
      dmd_i[39:8] = dram_q;
    end
  end

  // ------------------------------------------------------------ misc
  assign irq_n  = {cmd_irq_n, mhc_irq_n, roe_irq_n, md_irq_n};
  assign od_pmd = m_wdata[47:16];

  // Bus rule expected of the DSP: an access stays steady until it is
  // acknowledged.  Not checked while the DSP is held in reset.
  pm_hold_a: assert property (@(posedge clk) disable iff (!dsp_reset_n)
    ((!pmrd_n || !pmwr_n) && !pmack) |=> ($stable(pma) && $stable(pmrd_n) && $stable(pmwr_n)));
  dm_hold_a: assert property (@(posedge clk) disable iff (!dsp_reset_n)
    ((!dmrd_n || !dmwr_n) && !dmack) |=> ($stable(dma) && $stable(dmrd_n) && $stable(dmwr_n)));
endmodule
