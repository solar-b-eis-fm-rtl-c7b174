// Serial word shifter shared by the ST_IF and MD_IF transmitters.
//
// On a start pulse it loads a W-bit word and sends it most significant bit
// first.  Each bit lasts BIT_DIV system clocks: sdata changes at the start
// of the bit with sclk low, and sclk is high for the second half of the bit
// so the receiver can sample on its rising edge.  done pulses in the last
// clock of the last bit; a new start may be given in that same clock to send
// words back to back.  The bit order, the clock shape and BIT_DIV are this
// design's own choices, as the link timing belongs to the spacecraft
// interface specification.
module ser_tx #(
  parameter int unsigned W       = 8,
  parameter int unsigned BIT_DIV = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] data,
  output logic         busy,
  output logic         done,
  output logic         sclk,
  output logic         sdata
);
  localparam int unsigned DW = (BIT_DIV < 2) ? 1 : $clog2(BIT_DIV);
  localparam int unsigned BW = $clog2(W + 1);

  logic [W-1:0]  sh;
  logic [DW-1:0] div;
  logic [BW-1:0] nbit;
  logic          last_clk;

  assign last_clk = busy && (div == DW'(BIT_DIV - 1));
  assign done     = last_clk && (nbit == BW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh <= '0; div <= '0; nbit <= '0; busy <= 1'b0;
    end else if (start && (!busy || done)) begin
      sh <= data; div <= '0; nbit <= BW'(W); busy <= 1'b1;
    end else if (busy) begin
      if (last_clk) begin
        div  <= '0;
        sh   <= {sh[W-2:0], 1'b0};
        nbit <= nbit - 1'b1;
        if (nbit == BW'(1)) busy <= 1'b0;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  assign sdata = busy && sh[W-1];
  assign sclk  = busy && (div >= DW'(BIT_DIV / 2));
endmodule
