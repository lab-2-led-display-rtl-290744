// led_display_peripheral: PC-104 I/O port that shows a digit on a
// seven-segment LED.
//
// A program writes a byte to I/O port 220H (for example with an OUT
// instruction); the peripheral keeps that byte in an 8-bit register and
// shows its two low bits as the digit 0, 1, 2 or 3. Writes to any other
// port leave the display unchanged. Three parts do this:
//   io_addr_decoder   - compares A9..A0 with 220H;
//   io_write_register - 8-bit register clocked by the rising edge of IOW*,
//                       loading the data bus only on an address match;
//   seg7_decoder      - turns register bits 1..0 into segment drives.
//
// Interface: the bus side is A9..A0, D7..D0 and IOW* (low only during an I/O
// write). The LED side is seg[6:0] = {g,f,e,d,c,b,a}; these seven segments
// are the only outputs. The register keeps all 8 data bits, of which only
// bits 1..0 reach the display, so a linter reports bits 7..2 of reg_q as
// unused; they are kept because the port is specified as an 8-bit register.
//
// Timing: there is no system clock. The register samples on the rising
// edge of IOW*; the segments follow combinationally. The address and data
// lines must be stable across that edge, as the ISA write cycle provides.
//
// Address, width, edge and the 2-bit decode follow the lab description. The
// segment order and polarity parameter and the zero start value are this
// design's choices.
module led_display_peripheral
  import led_pkg::*;
#(
  parameter logic [ADDR_W-1:0] PORT_ADDR      = LED_PORT_ADDR,
  parameter bit                SEG_ACTIVE_LOW = 1'b0
) (
  input  logic [ADDR_W-1:0] addr,    // A9..A0
  input  logic [DATA_W-1:0] data,    // D7..D0
  input  logic              iow_n,   // IOW* write strobe
  output seg7_t             seg      // LED segments {g,f,e,d,c,b,a}
);

  logic              port_sel;   // address matches the port
  logic [DATA_W-1:0] reg_q;      // contents of the display register

  io_addr_decoder #(
    .AW        (ADDR_W),
    .PORT_ADDR (PORT_ADDR)
  ) u_decode (
    .addr (addr),
    .sel  (port_sel)
  );

  io_write_register #(
    .W (DATA_W)
  ) u_reg (
    .iow_n (iow_n),
    .load  (port_sel),
    .d     (data),
    .q     (reg_q)
  );

  seg7_decoder #(
    .ACTIVE_LOW (SEG_ACTIVE_LOW)
  ) u_seg (
    .value (reg_q[1:0]),
    .seg   (seg)
  );

endmodule
