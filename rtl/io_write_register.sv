// io_write_register: data register written by I/O write cycles.
//
// The IOW* strobe of the bus is used as the register clock. It is low only
// during a write to I/O space, and the data and address lines are valid at
// its rising (trailing) edge, so the register samples there. The address
// match enters as a load enable that chooses between the data bus and the
// register's own value; the strobe itself is never gated.
//
// Interface: iow_n (clock, rising edge active), load (address match),
// d (data bus), q (register contents). q changes only right after a rising
// edge of iow_n with load = 1.
//
// The edge, the enable mux and the 8-bit width follow the lab description.
// The bus has no reset in this peripheral's signal set, so the register has
// none; it starts from all zeros, the power-up value of an FPGA register
// after configuration. That start value is this design's choice. Linters
// point out that a variable written in always_ff also has a declaration
// initialiser; that is intended, as the initialiser is the configuration
// value, not a second driver.
module io_write_register
  import led_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         iow_n,   // I/O write strobe, active low
  input  logic         load,    // address match for this port
  input  logic [W-1:0] d,       // data bus
  output logic [W-1:0] q        // latched value
);

  logic [W-1:0] r = '0;

  always_ff @(posedge iow_n) begin
    if (load) r <= d;
  end

  always_comb q = r;

endmodule
