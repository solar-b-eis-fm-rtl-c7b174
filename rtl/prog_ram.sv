// Program memory: 128k x 48-bit RAM built from 6 128k x 8 SRAMs in width
// expansion, in bank 0 of the program memory space with no wait states.
//
// cs selects the bank (decoded from the address by the board), we writes
// wdata at addr on the clock edge, rdata shows the addressed word in the
// same cycle.  Byte k of the word sits in SRAM k; the most significant byte
// is in the highest-numbered chip.  The word width and chip count follow
// the board; WORDS may be reduced for short simulations.
module prog_ram #(
  parameter int unsigned WORDS = 131072
) (
  input  logic                     clk,
  input  logic                     cs,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [47:0]              wdata,
  output logic [47:0]              rdata
);
  for (genvar k = 0; k < 6; k++) begin : g_chip
    sram_128kx8 #(.WORDS(WORDS)) u_sram (
      .clk (clk),
      .ce_n(!cs),
      .we_n(!we),
      .oe_n(we),
      .addr(addr),
      .din (wdata[8*k +: 8]),
      .dout(rdata[8*k +: 8])
    );
  end
endmodule
