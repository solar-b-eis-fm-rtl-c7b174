// DC_RST: discrete hardware reset detector of the TWIB_CTL FPGA.
//
// Watches the packets received by the command interface.  A packet made of
// the single byte 0xF5 arms a window timer; a second such packet while the
// window is open raises req for one clock, which the watchdog turns into a
// warm reboot and records in its ~DC_Rst flag.  The window counts 512 Hz
// ticks; WINDOW = 8192 ticks is 16.0 s, the "approximately 16 seconds" of
// the board description.  Any other packet leaves the window running.
// Interface: single_cmd/single_byte come from CMD_IF at the end of a
// one-byte packet, tick is the 512 Hz strobe of the time counter.
module dc_rst #(
  parameter int unsigned WINDOW = 8192
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       single_cmd,
  input  logic [7:0] single_byte,
  output logic       req
);
  import sc_proc_pkg::*;

  localparam int unsigned WW = $clog2(WINDOW + 1);

  logic          armed;
  logic [WW-1:0] left;
  logic          hit;

  assign hit = single_cmd && (single_byte == DC_RST_BYTE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed <= 1'b0;
      left  <= '0;
      req   <= 1'b0;
    end else begin
      req <= 1'b0;
      if (hit && armed) begin
        req   <= 1'b1;
        armed <= 1'b0;
      end else if (hit) begin
        armed <= 1'b1;
        left  <= WW'(WINDOW);
      end else if (armed && tick) begin
        left <= left - 1'b1;
        if (left == WW'(1)) armed <= 1'b0;
      end
    end
  end
endmodule
