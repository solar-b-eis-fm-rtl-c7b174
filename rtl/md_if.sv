// MD_IF: mission data transmitter of the TWIB_CTL FPGA.
//
// Mission data packets may be longer than the 4k x 16 MD_FIFO (two 4k x 9
// FIFOs side by side, 8 bits used in each), so software sends a packet as
// sub-packets.  It fills the FIFO, then writes ~GO = 0; for every
// sub-packet but the last it leaves ~EOP = 1, for the last it writes
// ~EOP = 0 with ~GO.  Once the MDP's BUSY line is low the state machine
// raises MD_ENA and shifts the 16-bit words out over MD_CLK/MD_DATA, most
// significant bit first.  When the FIFO runs empty ~GO returns to 1.  If
// ~EOP is 1 the interface then holds MD_ENA high and idles until the next
// ~GO; if ~EOP is 0 MD_ENA falls, and that falling edge latches the
// interrupt (~IRQ0, flag ~Irq) until software clears it.
//
// Register interface (PMD[47:40] flag byte, one-cycle strobes):
//   stat = {0, ~FF, ~EF, BSY, ~Irq, ~EOP, ~GO, 0}
//   ctl_wr: bit 7 low resets, bit 3 low clears ~Irq, bit 2 is written to
//   ~EOP on every control write, bit 1 low starts a sub-packet.
//   dat_wr pushes dat_wdata (PMD[31:16]) into the FIFO.
// BUSY is tested before each sub-packet starts, a choice of this design;
// the interrupt follows the status register description (end of the whole
// packet).  Serial format: see ser_tx.
module md_if #(
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned BIT_DIV    = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ctl_wr,
  input  logic [7:0]  ctl_wdata,
  output logic [7:0]  stat,
  input  logic        dat_wr,
  input  logic [15:0] dat_wdata,
  input  logic        md_busy,
  output logic        md_ena,
  output logic        md_clk,
  output logic        md_data,
  output logic        irq_n
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_HOLD} state_e;

  logic soft_rst, lrst_n;
  assign soft_rst = ctl_wr && !ctl_wdata[7];
  assign lrst_n   = rst_n && !soft_rst;

  logic [1:0] busy_s;
  always_ff @(posedge clk) begin
    if (!rst_n) busy_s <= '0;
    else        busy_s <= {busy_s[0], md_busy};
  end

  logic [1:0] ef_n, ff_n, hf_unused;
  logic [8:0] q_hi, q_lo;
  logic       pop;

  fifo_4kx9 #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo_hi (
    .clk(clk), .rs_n(lrst_n), .wr(dat_wr), .din({1'b0, dat_wdata[15:8]}),
    .rd(pop), .dout(q_hi), .ef_n(ef_n[1]), .ff_n(ff_n[1]), .hf_n(hf_unused[1])
  );
  fifo_4kx9 #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo_lo (
    .clk(clk), .rs_n(lrst_n), .wr(dat_wr), .din({1'b0, dat_wdata[7:0]}),
    .rd(pop), .dout(q_lo), .ef_n(ef_n[0]), .ff_n(ff_n[0]), .hf_n(hf_unused[0])
  );

  logic   fifo_has;
  assign  fifo_has = &ef_n;

  state_e state;
  logic   go, eop_n, n_irq;
  logic   tx_busy, tx_done;

  assign pop = (state == S_SEND) && fifo_has && (!tx_busy || tx_done);

  ser_tx #(.W(16), .BIT_DIV(BIT_DIV)) u_tx (
    .clk(clk), .rst_n(lrst_n), .start(pop), .data({q_hi[7:0], q_lo[7:0]}),
    .busy(tx_busy), .done(tx_done), .sclk(md_clk), .sdata(md_data)
  );

  always_ff @(posedge clk) begin
    if (!lrst_n) begin
      state  <= S_IDLE;
      go     <= 1'b0;
      eop_n  <= 1'b0;
      n_irq  <= 1'b1;
      md_ena <= 1'b0;
    end else begin
      if (ctl_wr) begin
        eop_n <= ctl_wdata[2];
        if (!ctl_wdata[1]) go    <= 1'b1;
        if (!ctl_wdata[3]) n_irq <= 1'b1;
      end
      unique case (state)
        S_IDLE, S_HOLD: begin
          if (go && fifo_has && !busy_s[1]) begin
            state  <= S_SEND;
            md_ena <= 1'b1;
          end else if (go && !fifo_has) begin
            // nothing to send: the empty FIFO ends the sub-packet at once
            go <= 1'b0;
            if (state == S_HOLD && !eop_n) begin
              state  <= S_IDLE;
              md_ena <= 1'b0;
              n_irq  <= 1'b0;
            end
          end
        end
        S_SEND: begin
          if (!fifo_has && (!tx_busy || tx_done)) begin
            go <= 1'b0;
            if (eop_n) begin
              state <= S_HOLD;
            end else begin
              state  <= S_IDLE;
              md_ena <= 1'b0;
              n_irq  <= 1'b0;          // falling edge of MD_ENA
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign irq_n = n_irq;
  assign stat  = {1'b0, |ff_n, |ef_n, busy_s[1], n_irq, eop_n, !go, 1'b0};
endmodule
