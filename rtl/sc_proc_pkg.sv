// Shared constants of the SC_PROC processor board.
//
// Holds the system clock rate, the I/O port offsets of the TWIB_CTL
// interface FPGA (PM space 0xC0 000x, decoded on PMA[23:21] = 110 and
// PMA[3:0]), the bit positions of the status/control registers on the
// 48-bit program memory data bus, and the address windows of the memory
// map.  Port offsets and bit positions follow the board's register map;
// the serial link parameters are this design's own choice.
package sc_proc_pkg;

  // 20 MHz DSP / system clock.
  localparam int unsigned CLK_HZ = 20_000_000;

  // 512 Hz time base: 20 MHz / 39062 = 512.0066 Hz (1.9531 ms period).
  localparam int unsigned TICK_DIV = 39_062;

  // I/O port offsets, PMA[3:0], inside the TWIB_CTL window.
  typedef enum logic [3:0] {
    REG_SCTIME  = 4'h0,
    REG_WD      = 4'h1,
    REG_CMD_CTL = 4'h2,
    REG_CMD_DAT = 4'h3,
    REG_ST_CTL  = 4'h4,
    REG_ST_DAT  = 4'h5,
    REG_MD_CTL  = 4'h6,
    REG_MD_DAT  = 4'h7,
    REG_OD0     = 4'h8,
    REG_OD1     = 4'h9
  } io_reg_e;

  // Status/control flags live on PMD[47:40]; bit n of this byte is PMD(40+n).
  localparam int unsigned FLAG_LSB = 40;

  // Address windows (PMA[23:21]) of program memory space.
  localparam logic [2:0] PMA_RAM  = 3'b000;  // program RAM 0x00 0000
  localparam logic [2:0] PMA_CM   = 3'b100;  // CM_Ctl ports 0x80 0000
  localparam logic [2:0] PMA_MON  = 3'b101;  // MON ports    0xA0 0000
  localparam logic [2:0] PMA_IO   = 3'b110;  // SC_PROC I/O  0xC0 0000
  localparam logic [2:0] PMA_PROM = 3'b111;  // PROM         0xE0 0000

  // Command byte that, sent alone twice, resets the instrument.
  localparam logic [7:0] DC_RST_BYTE = 8'hF5;

endpackage
