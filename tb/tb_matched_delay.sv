`timescale 1ns / 1ps
// Test of the matched delay model: every edge of a reappears on z exactly
// DELAY_NS later.
//
// Expected values come from the model's definition; the delay (3 ns) and the
// random edge spacing are this test's choice. Ends with a TB_RESULT line;
// a watchdog stops it if it hangs.
module tb_matched_delay;
  logic a, z;
  int checks = 0, failures = 0;
  matched_delay #(.DELAY_NS(3)) dut (.a(a), .z(z));
  initial begin
    a = 1'b0;
    #10;
    for (int k = 0; k < 20; k++) begin
      a = ~a;
      #2.5;
      checks++; if (z == a) begin failures++; $display("FAIL: z early"); end
      #1;
      checks++; if (z != a) begin failures++; $display("FAIL: z late"); end
      #($urandom_range(1, 6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
