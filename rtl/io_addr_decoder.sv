// io_addr_decoder: I/O port address comparator.
//
// Asserts `sel` while the address lines equal PORT_ADDR. Only the low
// ADDR_W lines are compared: PC-compatible I/O decoding uses A9..A0, so the
// port also answers at every alias that differs only in A19..A10, which the
// peripheral does not see. The comparison is purely combinational; the
// register that uses `sel` samples it on the rising edge of IOW*, when the
// bus still holds the address of the write cycle.
//
// Port address 220H and the 10-bit decode follow the lab description; the
// module boundary is this design's own.
module io_addr_decoder
  import led_pkg::*;
#(
  parameter int unsigned          AW        = ADDR_W,
  parameter logic [AW-1:0]        PORT_ADDR = AW'(LED_PORT_ADDR)
) (
  input  logic [AW-1:0] addr,   // A9..A0 from the bus
  output logic          sel     // 1 when addr == PORT_ADDR
);

  always_comb sel = (addr == PORT_ADDR);

endmodule
