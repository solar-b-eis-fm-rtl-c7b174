// 128k x 8-bit static RAM, the part from which the program and data
// memories are built (25 ns access, so it answers within one 50 ns clock).
//
// Modelled in the 20 MHz clock domain: a write happens at the clock edge
// when ce_n and we_n are both low; the read port is asynchronous, dout
// shows the addressed byte while ce_n and oe_n are low and 0 otherwise.
// The organisation follows the part; the synchronous write strobe is this
// design's own simplification of the part's asynchronous ~WE pin.
module sram_128kx8 #(
  parameter int unsigned WORDS = 131072
) (
  input  logic                     clk,
  input  logic                     ce_n,
  input  logic                     we_n,
  input  logic                     oe_n,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [7:0]               din,
  output logic [7:0]               dout
);
  logic [7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (!ce_n && !we_n) mem[addr] <= din;
  end

  assign dout = (!ce_n && !oe_n) ? mem[addr] : 8'h00;
endmodule
