// ST_IF: status packet transmitter of the TWIB_CTL FPGA.
//
// Software writes a complete status packet, byte by byte, into the 4k x 9
// ST_FIFO (only the low 8 bits are used), then writes ~ST_GO = 0.  The
// state machine then raises ST_ENA and sends the FIFO contents to the MDP
// over ST_CLK/ST_DATA, one byte after the other with no gaps, most
// significant bit first.  When the FIFO has run empty and the last bit is
// out, ST_ENA falls and ~ST_GO returns to 1 by itself.  No interrupt is
// produced: status packets only answer commands.
//
// Register interface (PMD[47:40] flag byte, one-cycle strobes):
//   stat = {~ST_GO, 0, 0, 0, 0, ~EF, ~FF, ST_ENA}
//   ctl_wr: bit 7 low starts transmission, bit 2 low resets FIFO and FSM.
//   dat_wr pushes dat_wdata (PMD[23:16]) into the FIFO.
// Register layout and GO behaviour follow the board description; writing
// ~ST_GO = 1 has no effect (not described), and the serial format is this
// design's own (see ser_tx).
module st_if #(
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned BIT_DIV    = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctl_wr,
  input  logic [7:0] ctl_wdata,
  output logic [7:0] stat,
  input  logic       dat_wr,
  input  logic [7:0] dat_wdata,
  output logic       st_ena,
  output logic       st_clk,
  output logic       st_data
);
  logic soft_rst, lrst_n;
  assign soft_rst = ctl_wr && !ctl_wdata[2];
  assign lrst_n   = rst_n && !soft_rst;

  logic       ef_n, ff_n, hf_n_unused;
  logic [8:0] fifo_q;
  logic       pop;

  fifo_4kx9 #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo (
    .clk(clk), .rs_n(lrst_n),
    .wr(dat_wr), .din({1'b0, dat_wdata}),
    .rd(pop), .dout(fifo_q),
    .ef_n(ef_n), .ff_n(ff_n), .hf_n(hf_n_unused)
  );

  logic go;          // ~ST_GO inverted
  logic tx_busy, tx_done;

  // Start the next byte when idle-and-going, or back to back on done.
  assign pop = go && ef_n && (!tx_busy || tx_done);

  ser_tx #(.W(8), .BIT_DIV(BIT_DIV)) u_tx (
    .clk(clk), .rst_n(lrst_n), .start(pop), .data(fifo_q[7:0]),
    .busy(tx_busy), .done(tx_done), .sclk(st_clk), .sdata(st_data)
  );

  always_ff @(posedge clk) begin
    if (!lrst_n) begin
      go <= 1'b0;
    end else if (ctl_wr && !ctl_wdata[7]) begin
      go <= 1'b1;
    end else if (go && !ef_n && (!tx_busy || tx_done)) begin
      go <= 1'b0;
    end
  end

  assign st_ena = tx_busy;
  assign stat   = {!go, 4'b0000, ef_n, ff_n, st_ena};
endmodule
