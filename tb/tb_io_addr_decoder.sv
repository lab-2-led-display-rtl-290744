// tb_io_addr_decoder: exhaustive check of the I/O port address comparator.
//
// Sweeps all 1024 values of A9..A0 through the default instance (port 220H)
// and through a second instance set to port 378H, and checks that `sel` is
// high for exactly the one matching address in each. The expected value is
// the literal port number, not the module's parameter. A watchdog ends the
// run with a failure if the sweep does not finish.
module tb_io_addr_decoder;
  import led_pkg::*;

  logic [ADDR_W-1:0] addr;
  logic              sel_def, sel_alt;
  int                checks = 0, failures = 0;
  int                hits_def = 0, hits_alt = 0;

  io_addr_decoder dut_def (.addr(addr), .sel(sel_def));
  io_addr_decoder #(.AW(10), .PORT_ADDR(10'h378)) dut_alt (.addr(addr), .sel(sel_alt));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      addr = 10'(a);
      #10;
      checks++;
      if (sel_def !== (a == 'h220)) begin
        failures++;
        $display("FAIL default decoder addr=%03h sel=%b", a, sel_def);
      end
      checks++;
      if (sel_alt !== (a == 'h378)) begin
        failures++;
        $display("FAIL 378H decoder addr=%03h sel=%b", a, sel_alt);
      end
      hits_def += int'(sel_def);
      hits_alt += int'(sel_alt);
    end
    checks++;
    if (hits_def != 1 || hits_alt != 1) begin
      failures++;
      $display("FAIL match counts %0d %0d, expected 1 each", hits_def, hits_alt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
