// tb_io_write_register: checks the IOW*-clocked load-enable register.
//
// Drives write strobes with random data and a random load enable and keeps
// its own copy of what the register should hold. Checks: the start value is
// zero; the register takes the data bus at each rising edge of iow_n with
// load = 1 and holds otherwise; nothing happens at the falling edge or while
// iow_n is low, even when data and load change then. A watchdog ends the run
// with a failure if it hangs.
module tb_io_write_register;

  logic       iow_n = 1'b1;
  logic       load  = 1'b0;
  logic [7:0] d     = '0;
  logic [7:0] q;
  logic [7:0] model = '0;
  int         checks = 0, failures = 0;
  int         loads = 0, holds = 0;

  io_write_register dut (.iow_n(iow_n), .load(load), .d(d), .q(q));

  task automatic expect_q(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%02h expected %02h", what, q, model);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    expect_q("start value");
    for (int i = 0; i < 300; i++) begin
      // Strobe falls with junk on the bus; the register must not react.
      d     = 8'($urandom);
      load  = 1'($urandom);
      #20 iow_n = 1'b0;
      #20 expect_q("falling edge");
      // Bus settles to the values of this cycle while the strobe is low.
      d     = 8'($urandom);
      load  = 1'($urandom);
      #40 expect_q("strobe low");
      iow_n = 1'b1;
      if (load) begin
        model = d;
        loads++;
      end else begin
        holds++;
      end
      #5 expect_q("rising edge");
      // Bus lines change after the strobe; the register keeps its value.
      d    = ~d;
      load = ~load;
      #20 expect_q("after strobe");
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL loads=%0d holds=%0d, both must occur", loads, holds);
    end
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
