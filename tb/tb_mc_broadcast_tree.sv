`timescale 1ns / 1ps
// Test of the broadcast tree with 8 leaves (two levels: one fork to three,
// then two forks to three and one to two). The source pushes a token every
// 10 ns without waiting for the acknowledge, as the mode change controller
// does; each leaf acknowledges after its matched delay, as an extractor.
// Every leaf must receive every token in order, and the swap channel must
// reach every leaf. The tree shape functions are also checked: 2 levels for
// 8 and 4 leaves, 4 levels for 64 leaves.
//
// The one-token-per-cycle pushing and the tree shape (forks to two and three,
// equal depth, 5 asynchronous stages with the extractor for 64 nodes) come
// from the thesis design; token values and delays are random or chosen here.
module tb_mc_broadcast_tree;
  import mc_pkg::*;
  localparam int L = 8, W = 10, NTOK = 100;
  logic rst;
  logic in_req, in_ack, in_swap_req;
  logic [W-1:0] in_data;
  period_t in_swap_moment;
  logic [L-1:0] out_req, out_ack, out_swap_req;
  logic [L-1:0][W-1:0] out_data;
  period_t [L-1:0] out_swap_moment;
  logic [W-1:0] tokens [NTOK];
  int checks = 0, failures = 0;
  int got [L];
  bit go = 1'b0;

  mc_broadcast_tree #(.LEAVES(L), .W(W), .DELAY_NS(1)) dut (.*);

  for (genvar i = 0; i < L; i++) begin : g_leaf
    logic del;
    matched_delay #(.DELAY_NS(2)) u_d (.a(out_req[i]), .z(del));
    initial got[i] = 0;
    always @(del) if (go && del != out_ack[i]) begin
      checks++;
      if (out_data[i] != tokens[got[i]]) begin
        failures++;
        $display("FAIL: leaf %0d token %0d got %h expected %h", i, got[i], out_data[i], tokens[got[i]]);
      end
      got[i]++;
      out_ack[i] = del;
    end
  end

  initial begin
    checks += 3;
    if (tree_levels(8) != 2 || tree_levels(4) != 2 || tree_levels(64) != 4) begin
      failures++; $display("FAIL: tree level count");
    end
    if (tree_level_info(8, 0, 0) != 2 || tree_level_info(8, 0, 1) != 1 || tree_level_info(8, 1, 0) != 1) begin
      failures++; $display("FAIL: tree shape for 8 leaves");
    end
    if (tree_level_info(4, 0, 1) != 2 || tree_level_info(4, 1, 1) != 1) begin
      failures++; $display("FAIL: tree shape for 4 leaves");
    end
    for (int k = 0; k < NTOK; k++) tokens[k] = W'($urandom);
    rst = 1'b0; in_req = 1'b0; in_data = '0; out_ack = '0;
    in_swap_req = 1'b0; in_swap_moment = '0;
    #1 rst = 1'b1;
    #10 rst = 1'b0;
    #4 go = 1'b1;
    for (int k = 0; k < NTOK; k++) begin
      in_data = tokens[k];
      in_req  = ~in_req;
      #10;
    end
    in_swap_moment = 3'b010;
    in_swap_req = 1'b1;
    #50;
    for (int i = 0; i < L; i++) begin
      checks++;
      if (got[i] != NTOK) begin failures++; $display("FAIL: leaf %0d received %0d tokens", i, got[i]); end
      checks++;
      if (out_swap_req[i] != 1'b1 || out_swap_moment[i] != 3'b010) begin
        failures++; $display("FAIL: swap channel at leaf %0d", i);
      end
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
