`timescale 1ns / 1ps
// Test of the click-element fork: a 2-phase producer sends 60 random tokens
// (each as soon as the previous one is acknowledged); three consumers with
// different random response times acknowledge each token. Every consumer
// must see every token, in order, with its data; a fork that did not wait
// for all acknowledges would overwrite tokens for the slow consumers.
//
// The click rule checked is the thesis fork rule; tokens and consumer delays
// are random.
module tb_mc_tree_node;
  localparam int F = 3, W = 8, NTOK = 60;
  logic rst;
  logic in_req, in_ack;
  logic [W-1:0] in_data;
  logic [F-1:0] out_req, out_ack;
  logic [F-1:0][W-1:0] out_data;
  logic [W-1:0] tokens [NTOK];
  int checks = 0, failures = 0;
  int got [F];

  mc_tree_node #(.FANOUT(F), .W(W), .DELAY_NS(1)) dut (.*);

  for (genvar i = 0; i < F; i++) begin : g_cons
    initial begin
      got[i] = 0;
      out_ack[i] = 1'b0;
      wait (rst == 1'b1);
      wait (rst == 1'b0);
      while (got[i] < NTOK) begin
        wait (out_req[i] != out_ack[i]);
        #1;
        checks++;
        if (out_data[i] != tokens[got[i]]) begin
          failures++;
          $display("FAIL: consumer %0d token %0d got %h expected %h", i, got[i], out_data[i], tokens[got[i]]);
        end
        got[i]++;
        #($urandom_range(0, 4) + i * 7);
        out_ack[i] = ~out_ack[i];
      end
    end
  end

  initial begin
    for (int k = 0; k < NTOK; k++) tokens[k] = W'($urandom);
    rst = 1'b0; in_req = 1'b0; in_data = '0;
    #1 rst = 1'b1;
    #10 rst = 1'b0;
    #5;
    for (int k = 0; k < NTOK; k++) begin
      wait (in_ack == in_req);
      #($urandom_range(0, 2));
      in_data = tokens[k];
      #1 in_req = ~in_req;
    end
    wait (got[0] == NTOK && got[1] == NTOK && got[2] == NTOK);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("FAIL: watchdog, received %0d %0d %0d", got[0], got[1], got[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
