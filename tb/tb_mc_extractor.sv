`timescale 1ns / 1ps
// Test of the schedule extractor (ID 2 of 4 nodes). Two global schedules
// (5 and 3 slots per node) are pushed as the controller does: for every node
// a size word (size - 1) and then its slot words, one token every 10 ns. The
// extractor must write exactly node 2's words, to addresses 0..G-1 of the
// bank given on wbank, ignore every other node's tokens, acknowledge every
// token, and pass on the swap command with the received size.
// Then 20 random schedules (1 to 20 slots, random bank) are pushed with
// token spacing of 4 to 12 ns; each token must be acknowledged within 3 ns.
//
// The token protocol (size word first, then the view, tagged by node ID)
// follows the thesis design; the data are random.
module tb_mc_extractor;
  import mc_pkg::*;
  localparam int ID = 2, N = 4;
  logic rst;
  logic in_req, in_ack, in_swap_req;
  logic [1:0] in_id;
  mc_word_t in_data;
  period_t in_swap_moment;
  logic na_swap_req;
  slot_cnt_t na_swap_size;
  period_t na_swap_moment;
  logic wbank, st_wclk, st_wen;
  logic [SLOT_CNT_W:0] st_waddr;
  mc_word_t st_wdata;
  int checks = 0, failures = 0;

  mc_extractor #(.ID(ID), .ID_W(2), .DELAY_NS(2)) dut (.*);

  mc_word_t expd [$];
  logic [SLOT_CNT_W:0] expa [$];
  int writes = 0;

  always @(posedge st_wclk) if (st_wen) begin
    checks++;
    writes++;
    if (expd.size() == 0) begin
      failures++; $display("FAIL: unexpected write at %h", st_waddr);
    end else begin
      mc_word_t d; logic [SLOT_CNT_W:0] a;
      d = expd.pop_front(); a = expa.pop_front();
      if (st_wdata != d || st_waddr != a) begin
        failures++;
        $display("FAIL: write %h@%h expected %h@%h", st_wdata, st_waddr, d, a);
      end
    end
  end

  // one token; the next one follows after gap ns without waiting for ack,
  // but ack must have answered within the matched delay plus 1 ns
  task automatic token(input logic [1:0] id, input mc_word_t d, input int gap);
    in_id = id; in_data = d; in_req = ~in_req;
    #3;
    checks++;
    if (in_ack != in_req) begin failures++; $display("FAIL: no acknowledge within 3 ns"); end
    #(gap - 3);
  endtask

  task automatic push(input int g, input bit bank, input int gap);
    wbank = bank;
    for (int n = 0; n < N; n++) begin
      token(2'(n), mc_word_t'(g - 1), gap);
      for (int s = 0; s < g; s++) begin
        mc_word_t w;
        w = mc_word_t'($urandom);
        if (n == ID) begin expd.push_back(w); expa.push_back({bank, SLOT_CNT_W'(s)}); end
        token(2'(n), w, gap);
      end
    end
    #20;
    checks++;
    if (in_ack != in_req) begin failures++; $display("FAIL: token not acknowledged"); end
    checks++;
    if (expd.size() != 0) begin failures++; $display("FAIL: %0d words not written", expd.size()); end
    checks++;
    if (na_swap_size != slot_cnt_t'(g - 1)) begin failures++; $display("FAIL: swap size"); end
  endtask

  initial begin
    rst = 1'b0; in_req = 1'b0; in_id = '0; in_data = '0; wbank = 1'b1;
    in_swap_req = 1'b0; in_swap_moment = 3'b001;
    #1 rst = 1'b1;
    #10 rst = 1'b0;
    #5;
    push(5, 1'b1, 10);
    in_swap_req = 1'b1; in_swap_moment = 3'b100;
    #1;
    checks++;
    if (na_swap_req != 1'b1 || na_swap_moment != 3'b100) begin failures++; $display("FAIL: swap channel"); end
    push(3, 1'b0, 10);
    checks++;
    if (writes != 8) begin failures++; $display("FAIL: %0d writes", writes); end
    // random schedules, banks and token spacing (down to 4 ns)
    for (int r = 0; r < 20; r++) begin
      int g, w0;
      g = 1 + int'($urandom_range(0, 19));
      w0 = writes;
      push(g, 1'($urandom), 4 + int'($urandom_range(0, 8)));
      checks++;
      if (writes - w0 != g) begin failures++; $display("FAIL: %0d writes for %0d slots", writes - w0, g); end
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
