// Checks the credit counters: a flit sent takes one credit of its target
// buffer, a credit returned by the downstream router (gray-coded running
// count) comes back exactly two output-clock edges later, the two straight
// return counts add up, and the count never goes below zero when the sender
// respects it. A reference count is kept in the testbench.
`timescale 1ns / 1ps
module tb_abc_credit_ctrl;
  import abc_pkg::*;
  logic clk = 0, rst_n = 1;
  cred_t cred_in = '0;
  logic send = 0;
  tgt_e send_tgt = TGT_STRAIGHT;
  logic [N_TGT-1:0][CNT_W-1:0] avail;
  int checks = 0, failures = 0;
  int sent [N_TGT], ret_now [N_CRED], ret_d1 [N_CRED], ret_d2 [N_CRED];
  int outstanding [N_TGT];   // flits in the downstream buffer, not yet freed

  abc_credit_ctrl #(.DEPTH(8)) dut (.clk, .rst_n, .cred_in, .send, .send_tgt, .avail);

  always #5 clk = ~clk;

  function automatic int exp_avail(int t);
    int r;
    case (t)
      0: r = ret_d2[CR_STR_ABC] + ret_d2[CR_STR_FIFO];
      1: r = ret_d2[CR_TURN_P];
      2: r = ret_d2[CR_TURN_M];
      default: r = ret_d2[CR_EJECT];
    endcase
    return 8 - (sent[t] - r);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int t = 0; t < N_TGT; t++) begin
        checks++;
        if (int'(avail[t]) != exp_avail(t)) begin
          failures++;
          $display("FAIL t%0d avail %0d expected %0d", t, avail[t], exp_avail(t));
        end
      end
      if (send) begin
        sent[send_tgt]++;
        outstanding[send_tgt]++;
      end
      for (int c = 0; c < N_CRED; c++) begin
        ret_d2[c] = ret_d1[c];
        ret_d1[c] = ret_now[c];
      end
      // downstream frees a slot now and then
      for (int c = 0; c < N_CRED; c++) begin
        int t;
        t = (c <= 1) ? 0 : c - 1;
        if (outstanding[t] > 0 && $urandom_range(99) < 20) begin
          outstanding[t]--;
          ret_now[c]++;
          cred_in[c] <= bin2gray(CNT_W'(ret_now[c]));
        end
      end
      begin
        tgt_e t;
        t = tgt_e'($urandom_range(3));
        send_tgt <= t;
        send     <= (avail[t] > 1) && ($urandom_range(99) < 60);
      end
    end
  end

  initial begin
    for (int t = 0; t < N_TGT; t++) begin sent[t] = 0; outstanding[t] = 0; end
    for (int c = 0; c < N_CRED; c++) begin ret_now[c] = 0; ret_d1[c] = 0; ret_d2[c] = 0; end
    #1 rst_n = 0;
    #12 rst_n = 1;
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
