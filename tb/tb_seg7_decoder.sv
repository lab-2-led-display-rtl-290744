// tb_seg7_decoder: checks the digit patterns of the seven-segment decoder.
//
// The expected patterns are written out by segment name ({g,f,e,d,c,b,a}):
// 0 = abcdef, 1 = bc, 2 = abdeg, 3 = abcdg. Both the default (1 = lit) and
// the inverted ACTIVE_LOW instance are checked for all four inputs. A
// watchdog ends the run with a failure if it hangs.
module tb_seg7_decoder;
  import led_pkg::*;

  logic [1:0] value;
  seg7_t      seg_hi, seg_lo;
  int         checks = 0, failures = 0;

  //                         gfedcba
  localparam seg7_t EXP [4] = '{7'b0111111, 7'b0000110, 7'b1011011, 7'b1001111};

  seg7_decoder dut_hi (.value(value), .seg(seg_hi));
  seg7_decoder #(.ACTIVE_LOW(1'b1)) dut_lo (.value(value), .seg(seg_lo));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      value = 2'(v);
      #10;
      checks++;
      if (seg_hi !== EXP[v]) begin
        failures++;
        $display("FAIL value %0d seg=%07b expected %07b", v, seg_hi, EXP[v]);
      end
      checks++;
      if (seg_lo !== ~EXP[v]) begin
        failures++;
        $display("FAIL active-low value %0d seg=%07b expected %07b", v, seg_lo, ~EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
