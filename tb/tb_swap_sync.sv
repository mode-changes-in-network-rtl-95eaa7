`timescale 1ns / 1ps
// Test of swap_sync: after reset the output is 0; a level change of d, made
// between clock edges, reaches q after exactly STAGES rising edges.
//
// Two stages is the thesis default; the toggle times are random.
module tb_swap_sync;
  logic clk = 1'b0, rst, d, q;
  int checks = 0, failures = 0;
  swap_sync #(.STAGES(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst = 1'b0; d = 1'b0;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL: q after reset"); end
    for (int t = 0; t < 20; t++) begin
      logic nd;
      @(negedge clk);
      #($urandom_range(0, 3));
      nd = ~d;
      d = nd;
      @(posedge clk); #1;
      checks++; if (q == nd) begin failures++; $display("FAIL: q followed after one edge"); end
      @(posedge clk); #1;
      checks++; if (q != nd) begin failures++; $display("FAIL: q not following after two edges"); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
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
