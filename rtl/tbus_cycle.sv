// One retimed bus channel of the TBUS_CTL FPGA (used once for the program
// memory bus and once for the data memory bus).
//
// When the processor starts an access to a slow or off-board port (req
// high with rd or wr), the channel registers address, write data and the
// device select onto the buffered side and drives the buffered strobe low
// from the next clock.  It holds the processor (ack low) for a minimum
// cycle of MIN_CYC clocks (4 clocks = 200 ns).  If the device pulls its
// b_ack_n (~PMACK_B) low during the first two clocks of its strobe, the
// processor is held until b_ack_n goes high again, so each device sets its
// own access time.  Read data from the buffered side is registered every
// clock and returned in the cycle where ack is high; the processor ends the
// access on that clock edge, and the strobe is released.
// The minimum cycle and the two-clock window follow the board description;
// the exact clock on which strobes start and data is sampled is this
// design's own choice.
module tbus_cycle #(
  parameter int unsigned AW      = 24,
  parameter int unsigned SW      = 3,
  parameter int unsigned MIN_CYC = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          req,        // address lies in this channel's space
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  input  logic [SW-1:0] sel_n,      // device select(s) decoded from addr
  output logic [15:0]   rdata,
  output logic          ack,
  output logic          held,       // this access was extended by the device
  // buffered side
  output logic [AW-1:0] b_addr,
  output logic [15:0]   b_wdata,
  output logic          b_rd_n,
  output logic          b_wr_n,
  output logic [SW-1:0] b_sel_n,
  input  logic [15:0]   b_rdata,
  input  logic          b_ack_n
);
  localparam int unsigned CW = $clog2(MIN_CYC + 1);

  logic          active;
  logic [CW-1:0] cnt;

  assign ack = active && (cnt >= CW'(MIN_CYC - 1)) && !(held && !b_ack_n);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cnt     <= '0;
      held    <= 1'b0;
      b_addr  <= '0;
      b_wdata <= '0;
      b_rd_n  <= 1'b1;
      b_wr_n  <= 1'b1;
      b_sel_n <= '1;
      rdata   <= '0;
    end else begin
      rdata <= b_rdata;
      if (!active) begin
        held <= 1'b0;
        if (req && (rd || wr)) begin
          active  <= 1'b1;
          cnt     <= CW'(1);
          b_addr  <= addr;
          b_wdata <= wdata;
          b_rd_n  <= !rd;
          b_wr_n  <= !wr;
          b_sel_n <= sel_n;
        end
      end else if (ack) begin
        active  <= 1'b0;
        b_rd_n  <= 1'b1;
        b_wr_n  <= 1'b1;
        b_sel_n <= '1;
      end else begin
        if (cnt != CW'(MIN_CYC)) cnt <= cnt + 1'b1;
        if (cnt <= CW'(2) && !b_ack_n) held <= 1'b1;
      end
    end
  end

  // Cycle rules: an access is acknowledged no sooner than MIN_CYC - 2
  // clocks after its strobe started (MIN_CYC clocks in all, with the
  // request clock and the ack clock; the clock before every access is
  // inactive), and the buffered address and strobes stay steady until the
  // ack.
  min_cycle_a: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> $past(active, MIN_CYC - 2));
  steady_a: assert property (@(posedge clk) disable iff (!rst_n)
    (active && !ack) |=> ($stable(b_addr) && $stable(b_rd_n) && $stable(b_wr_n)));
endmodule
