// SCTIME_IF: spacecraft time counter of the TWIB_CTL FPGA.
//
// A prescaler divides the 20 MHz clock by TICK_DIV = 39062 to give the
// 512.0066 Hz (1.9531 ms) time base, and each tick advances a 32-bit time
// counter.  Software loads the time received from the MDP with a write
// (wr, wdata = PMD[47:16]) and reads the current value back on time_o.  A
// load also restarts the prescaler so the first tick after it comes a full
// period later.  tick is the one-clock 512 Hz strobe, also used by the
// discrete reset detector.
//
// The prescaler, as part of the clock generator, is reset only at power-on
// (por_n); the time value is cleared by any board reset (rst_n).  The
// 32-bit width and the 512 Hz rate follow the board description; the
// prescaler restart on load and the reset split are this design's choices.
module sc_time #(
  parameter int unsigned TICK_DIV = 39_062
) (
  input  logic        clk,
  input  logic        por_n,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [31:0] wdata,
  output logic [31:0] time_o,
  output logic        tick
);
  localparam int unsigned DW = $clog2(TICK_DIV);

  logic [DW-1:0] div;

  assign tick = (div == DW'(TICK_DIV - 1));

  always_ff @(posedge clk) begin
    if (!por_n)                div <= '0;
    else if (wr || tick)       div <= '0;
    else                       div <= div + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    time_o <= '0;
    else if (wr)   time_o <= wdata;
    else if (tick) time_o <= time_o + 1'b1;
  end
endmodule
