// led_pkg: widths, the port address and the segment type shared by the
// LED display peripheral.
//
// The peripheral sees the low 10 address lines, the 8-bit data bus and the
// IOW* strobe of a PC-104 (ISA) bus. The port address 220H, the 10-bit
// address decode and the 8-bit register follow the lab description. The bit
// order of the segment vector, {g,f,e,d,c,b,a}, is this design's own choice.
package led_pkg;

  // Address lines A9..A0 that take part in I/O port decoding.
  localparam int unsigned ADDR_W = 10;
  // Data lines D7..D0 of the 8-bit PC-104 data bus.
  localparam int unsigned DATA_W = 8;
  // I/O port that loads the display register.
  localparam logic [ADDR_W-1:0] LED_PORT_ADDR = 10'h220;

  // One bit per LED segment, bit 0 = segment a ... bit 6 = segment g.
  typedef logic [6:0] seg7_t;

  // Segment names in bit order, for readable code.
  typedef enum int unsigned {
    SEG_A = 0, SEG_B = 1, SEG_C = 2, SEG_D = 3, SEG_E = 4, SEG_F = 5, SEG_G = 6
  } seg_idx_e;

endpackage
