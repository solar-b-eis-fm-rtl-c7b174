// 4k x 9-bit FIFO, the buffer part used by the CMD, ST and MD interfaces.
//
// A circular buffer in one memory array with write and read pointers and
// an occupancy counter.  The flags are active low like the part's pins:
// ef_n is low when empty, ff_n low when full and hf_n low when more than
// half the words are held.  rs_n clears the FIFO synchronously.
//
// Interface and timing: all in the 20 MHz system clock domain.  dout always
// shows the oldest word (first-word fall-through); a cycle with rd high pops
// it, a cycle with wr high pushes din.  A write to a full FIFO and a read
// from an empty one are ignored.  A simultaneous read and write is allowed.
// The depth and width follow the part named on the board (4k x 9); the
// synchronous single-clock strobes stand in for the part's asynchronous
// ~W/~R pins, which is this design's own choice.
module fifo_4kx9 #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rs_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             ef_n,
  output logic             ff_n,
  output logic             hf_n
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign do_wr = wr && ff_n;
  assign do_rd = rd && (count != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rs_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  assign dout = mem[rptr];
  assign ef_n = (count != '0);
  assign ff_n = (count != (AW+1)'(DEPTH));
  assign hf_n = (count <= (AW+1)'(DEPTH / 2));

  // The occupancy never exceeds the depth, and the FIFO is never flagged
  // empty and full at once.
  occupancy_a: assert property (@(posedge clk) disable iff (!rs_n) count <= (AW+1)'(DEPTH));
  flags_a: assert property (@(posedge clk) disable iff (!rs_n) !(!ef_n && !ff_n));
endmodule
