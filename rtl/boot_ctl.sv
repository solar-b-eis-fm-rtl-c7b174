// Boot_Ctl: copies the boot loader from PROM to program RAM.
//
// The boot PROM holds 48-bit instructions as six consecutive bytes, most
// significant byte first.  After power-on or a warm reboot (rst_n low) the
// controller keeps the DSP in reset (dsp_rst_n low) and becomes master of
// the program memory bus.  For each instruction i it reads the six PROM
// bytes at 0xE0 0000 + 6i .. 6i+5 (byte lane PMD[23:16], through the
// buffered bus of TBUS_CTL, four clocks or more per byte), assembles the
// word and writes it to program RAM at address i.  After BOOT_WORDS
// instructions it releases the bus and the DSP reset, and the DSP starts
// the copied loader at address 0.
//
// Bus interface: m_rd / m_wr are held with m_addr and m_wdata until m_ack
// is high at a clock edge, which ends the access.
// The copy scheme (six bytes per instruction, PROM from 0, RAM from 0,
// DSP held in reset) follows the board description; the byte order and
// the loader length BOOT_WORDS are this design's choices.
module boot_ctl #(
  parameter int unsigned BOOT_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        dsp_rst_n,
  output logic        busy,        // boot controller owns the PM bus
  output logic [23:0] m_addr,
  output logic        m_rd,
  output logic        m_wr,
  output logic [47:0] m_wdata,
  input  logic [47:0] m_rdata,
  input  logic        m_ack
);
  import sc_proc_pkg::*;

  typedef enum logic [1:0] {B_READ, B_WRITE, B_DONE} bstate_e;

  localparam int unsigned WW = $clog2(BOOT_WORDS + 1);

  bstate_e       state;
  logic [20:0]   prom_addr;    // byte address in the PROM window
  logic [2:0]    nbyte;        // bytes collected for this instruction
  logic [WW-1:0] word;
  logic [47:0]   instr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= B_READ;
      prom_addr <= '0;
      nbyte     <= '0;
      word      <= '0;
      instr     <= '0;
    end else begin
      unique case (state)
        B_READ: if (m_ack) begin
          instr     <= {instr[39:0], m_rdata[23:16]};
          prom_addr <= prom_addr + 1'b1;
          if (nbyte == 3'd5) begin
            nbyte <= '0;
            state <= B_WRITE;
          end else begin
            nbyte <= nbyte + 1'b1;
          end
        end
        B_WRITE: if (m_ack) begin
          word  <= word + 1'b1;
          state <= (word == WW'(BOOT_WORDS - 1)) ? B_DONE : B_READ;
        end
        default: ;
      endcase
    end
  end

  assign busy      = (state != B_DONE);
  assign dsp_rst_n = !busy;
  assign m_rd      = (state == B_READ);
  assign m_wr      = (state == B_WRITE);
  assign m_addr    = (state == B_READ) ? {PMA_PROM, prom_addr} : 24'(word);
  assign m_wdata   = instr;
endmodule
