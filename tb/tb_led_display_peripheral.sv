// tb_led_display_peripheral: end-to-end test of the LED display port at its
// default parameters (port 220H, segments lit by a 1).
//
// A bus-master task plays PC-104 I/O write cycles: address first, then
// IOW* low with junk on the data lines, then the real data, then IOW* high,
// then the lines change. The test
//   1. checks the display shows 0 before any write;
//   2. replays the utility program: the characters '0'..'3' typed by a
//      user, minus ASCII '0', each written to port 220H;
//   3. writes to 21FH and other neighbouring ports and checks the display
//      does not change;
//   4. writes a full byte (F2H) to check that all 8 bits are kept and only
//      bits 1..0 reach the display;
//   5. runs 2000 random writes, half of them to 220H, against a reference
//      copy of the register.
// Every write checks the internal 8-bit register and the seven segments against expected values
// written out per digit. Each mechanism is counted: loads on a port match,
// holds on a miss, and each of the four digits shown; one that never
// happens counts as a failure. A watchdog ends a hung run.
module tb_led_display_peripheral;
  import led_pkg::*;

  logic [9:0] addr  = '0;
  logic [7:0] data  = '0;
  logic       iow_n = 1'b1;
  seg7_t      seg;
  logic [7:0] reg_q;

  // The register has no output port of its own; look at it inside the DUT.
  always_comb reg_q = dut.reg_q;

  logic [7:0] model = '0;   // expected register contents
  int checks = 0, failures = 0;
  int n_load = 0, n_hold = 0;
  int n_digit [4] = '{0, 0, 0, 0};

  //                         gfedcba
  localparam seg7_t DIGIT [4] = '{7'b0111111, 7'b0000110, 7'b1011011, 7'b1001111};

  led_display_peripheral dut (
    .addr (addr), .data (data), .iow_n (iow_n), .seg (seg)
  );

  task automatic check_display(string what);
    checks++;
    if (reg_q !== model) begin
      failures++;
      $display("FAIL %s: reg_q=%02h expected %02h", what, reg_q, model);
    end
    checks++;
    if (seg !== DIGIT[model[1:0]]) begin
      failures++;
      $display("FAIL %s: seg=%07b expected %07b (digit %0d)", what, seg,
               DIGIT[model[1:0]], model[1:0]);
    end
    n_digit[model[1:0]]++;
  endtask

  // One ISA/PC-104 I/O write cycle.
  task automatic io_write(input logic [9:0] a, input logic [7:0] v);
    addr = a;
    data = 8'($urandom);
    #20 iow_n = 1'b0;
    #30 data = v;
    #100 iow_n = 1'b1;
    if (a == 10'h220) begin
      model = v;
      n_load++;
    end else begin
      n_hold++;
    end
    #10;
    check_display($sformatf("write %02h to %03h", v, a));
    addr = 10'($urandom);
    data = 8'($urandom);
    #40;
    check_display($sformatf("after write to %03h", a));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static byte unsigned keys [4] = '{"0", "1", "2", "3"};
    static logic [9:0] a;
    #10;
    check_display("power-up");

    // Utility program: read a key, subtract '0', OUT 220H.
    foreach (keys[i]) io_write(10'h220, 8'(keys[i] - 8'h30));
    // In reverse order too, so each digit follows a different one.
    for (int i = 3; i >= 0; i--) io_write(10'h220, 8'(keys[i] - 8'h30));

    // Writes to other ports leave the display alone.
    io_write(10'h220, 8'h01);
    io_write(10'h21F, 8'h02);
    io_write(10'h221, 8'h03);
    io_write(10'h020, 8'h00);   // differs in A9 only
    io_write(10'h320, 8'h00);   // differs in A8 only

    // All eight bits are stored; only bits 1..0 are shown.
    io_write(10'h220, 8'hF2);

    // Random traffic.
    for (int i = 0; i < 2000; i++) begin
      a = ($urandom_range(0, 1) != 0) ? 10'h220 : 10'($urandom);
      io_write(a, 8'($urandom));
    end

    checks++;
    if (n_load == 0) begin failures++; $display("FAIL no load on a port match"); end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL no hold on a port miss"); end
    foreach (n_digit[i]) begin
      checks++;
      if (n_digit[i] == 0) begin failures++; $display("FAIL digit %0d never shown", i); end
    end
    $display("loads=%0d holds=%0d digits shown 0:%0d 1:%0d 2:%0d 3:%0d",
             n_load, n_hold, n_digit[0], n_digit[1], n_digit[2], n_digit[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
