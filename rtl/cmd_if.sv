// CMD_IF: serial command receiver of the TWIB_CTL FPGA.
//
// The MDP sends a command packet as a serial bit stream framed by CMD_ENA
// and clocked by CMD_CLK.  The three link lines are brought into the 20 MHz
// clock domain by two-stage synchronisers; a rising edge of the synchronised
// CMD_CLK while CMD_ENA is high shifts in CMD_DATA, most significant bit
// first.  Each completed byte is held back by one byte so that the last
// byte of the packet can be tagged with the End-of-Command bit (bit 8) when
// CMD_ENA falls.  Bytes are packed three at a time into a 27-bit word and
// written in parallel to three 4k x 9 FIFOs; a packet whose length is not a
// multiple of three is closed by a word padded with zero segments after the
// tagged byte.  The falling edge of CMD_ENA raises the interrupt (~Irq), and
// if the packet was not a whole number of bytes it sets ~BitErr.  A word
// that meets a full FIFO is lost and sets ~OvrFlw.
//
// Register interface (PMD[47:40] flag byte, one-cycle strobes):
//   stat  = {0, ~BitErr, ~HF, ~Irq, ~OvrFlw, ~EF, ~FF, CMD_ENA}
//   ctl_wr with ctl_wdata bits 6/4/3/2 low clears ~BitErr / ~Irq / ~OvrFlw
//   or resets the interface and FIFO.  dat_rd pops one 27-bit word,
//   dat_rdata = {EOC,byte, EOC,byte, EOC,byte}, first byte in the top 9 bits.
// The FIFO flags in stat are the OR of the three FIFOs' active-low flags.
// single_cmd pulses at the end of a packet of exactly one whole byte, with
// that byte on single_byte (used by the discrete reset detector).
// Register layout, FIFO organisation and interrupt rule follow the board
// description; the bit order, the three-word packing of short packets and
// the synchroniser sampling are this design's own choices.
module cmd_if #(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // serial link from the MDP
  input  logic        cmd_ena,
  input  logic        cmd_clk,
  input  logic        cmd_data,
  // register access
  input  logic        ctl_wr,
  input  logic [7:0]  ctl_wdata,
  output logic [7:0]  stat,
  input  logic        dat_rd,
  output logic [26:0] dat_rdata,
  // interrupt (~IRQ3), active low
  output logic        irq_n,
  // single-byte command report
  output logic        single_cmd,
  output logic [7:0]  single_byte
);
  // ---------------------------------------------------------------- sync
  logic [2:0] s_ena, s_clk, s_dat;   // [0] first stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_ena <= '0; s_clk <= '0; s_dat <= '0;
    end else begin
      s_ena <= {s_ena[1:0], cmd_ena};
      s_clk <= {s_clk[1:0], cmd_clk};
      s_dat <= {s_dat[1:0], cmd_data};
    end
  end
  logic ena, clk_rise, ena_fall;
  assign ena      = s_ena[1];
  assign clk_rise = s_clk[1] && !s_clk[2] && ena;
  assign ena_fall = !s_ena[1] && s_ena[2];

  // ---------------------------------------------------------------- local reset
  logic soft_rst, lrst_n;
  assign soft_rst = ctl_wr && !ctl_wdata[2];
  assign lrst_n   = rst_n && !soft_rst;

  // ---------------------------------------------------------------- FIFOs
  logic [2:0] ef_n, ff_n, hf_n;
  logic       fifo_wr;
  logic [26:0] fifo_word;
  for (genvar k = 0; k < 3; k++) begin : g_fifo
    fifo_4kx9 #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo (
      .clk (clk), .rs_n(lrst_n),
      .wr  (fifo_wr && (&ff_n)), .din(fifo_word[26-9*k -: 9]),
      .rd  (dat_rd), .dout(dat_rdata[26-9*k -: 9]),
      .ef_n(ef_n[k]), .ff_n(ff_n[k]), .hf_n(hf_n[k])
    );
  end

  // ---------------------------------------------------------------- receiver
  logic [7:0] shreg;
  logic [2:0] bitcnt;
  logic [7:0] pend;
  logic       have_pend;
  logic [8:0] grp [3];
  logic [1:0] gcnt;
  logic [1:0] nbytes;          // bytes in packet, saturating at 2
  logic [7:0] first_byte;
  logic       n_biterr, n_irq, n_ovr;

  // one push per cycle into the group assembler
  logic       push;
  logic [8:0] push_seg;
  always_comb begin
    push     = 1'b0;
    push_seg = '0;
    if (clk_rise && bitcnt == 3'd7 && have_pend) begin
      push = 1'b1; push_seg = {1'b0, pend};
    end else if (ena_fall && have_pend) begin
      push = 1'b1; push_seg = {1'b1, pend};
    end
  end

  always_ff @(posedge clk) begin
    if (!lrst_n) begin
      shreg <= '0; bitcnt <= '0; pend <= '0; have_pend <= 1'b0;
      grp <= '{default: '0}; gcnt <= '0; nbytes <= '0; first_byte <= '0;
      fifo_wr <= 1'b0; fifo_word <= '0;
      n_biterr <= 1'b1; n_irq <= 1'b1; n_ovr <= 1'b1;
      single_cmd <= 1'b0; single_byte <= '0;
    end else begin
      fifo_wr    <= 1'b0;
      single_cmd <= 1'b0;

      if (clk_rise) begin
        shreg  <= {shreg[6:0], s_dat[1]};
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 3'd7) begin
          pend      <= {shreg[6:0], s_dat[1]};
          have_pend <= 1'b1;
          if (nbytes == 2'd0) first_byte <= {shreg[6:0], s_dat[1]};
          if (nbytes != 2'd2) nbytes <= nbytes + 1'b1;
        end
      end

      if (push) begin
        if (gcnt == 2'd2 || push_seg[8]) begin
          for (int k = 0; k < 3; k++)
            fifo_word[26-9*k -: 9] <= (k < int'(gcnt)) ? grp[k]
                                    : (k == int'(gcnt)) ? push_seg : 9'h000;
          fifo_wr <= 1'b1;
          gcnt    <= '0;
        end else begin
          grp[gcnt] <= push_seg;
          gcnt      <= gcnt + 1'b1;
        end
      end

      if (ena_fall) begin
        have_pend <= 1'b0;
        bitcnt    <= '0;
        shreg     <= '0;
        nbytes    <= '0;
        n_irq     <= 1'b0;
        if (bitcnt != 3'd0) n_biterr <= 1'b0;
        if (nbytes == 2'd1 && bitcnt == 3'd0) begin
          single_cmd  <= 1'b1;
          single_byte <= first_byte;
        end
      end

      if (fifo_wr && !(&ff_n)) n_ovr <= 1'b0;

      if (ctl_wr) begin
        if (!ctl_wdata[6]) n_biterr <= 1'b1;
        if (!ctl_wdata[4]) n_irq    <= 1'b1;
        if (!ctl_wdata[3]) n_ovr    <= 1'b1;
      end
    end
  end

  assign stat  = {1'b0, n_biterr, |hf_n, n_irq, n_ovr, |ef_n, |ff_n, ena};
  assign irq_n = n_irq;
endmodule
