// Checks the output-port FSM against the document's state diagram: the
// sequence FIFO, 3, 4, 5, 6, 7, 8, 9, ABC one local cycle per state when
// nothing interferes; an abort in state 3 or 4 returning to FIFO in one cycle;
// an abort from state 5 on passing through 1 and 2 and raising thrash; ABC
// left through 1 and 2 on a waiting turn packet or when the incoming gate
// closes; the clock requests and the read enable of each state. The incoming
// side is modelled by the testbench: it acknowledges the request two cycles
// after it is raised and opens the gate a cycle later.
`timescale 1ns / 1ps
module tb_abc_out_fsm;
  logic clk = 0, rst_n = 1;
  logic any_pend = 0, turn_pend = 0, busy = 0, credit_ok = 1, in_on_l = 0, in_busy_l = 0, in_ack_l = 0;
  logic abc_allowed = 1;
  logic loc_req, in_req, rd_ok, thrash, abc_mode;
  logic [3:0] state_o;
  logic [3:0] req_d;
  logic force_off = 0;
  int checks = 0, failures = 0, n_thrash = 0;

  abc_out_fsm dut (.*);

  always #5 clk = ~clk;

  // incoming-side model
  always @(posedge clk) begin
    req_d     <= {req_d[2:0], in_req};
    in_ack_l  <= req_d[1];
    in_on_l   <= req_d[2] && !force_off;
    in_busy_l <= req_d[1] || (req_d[2] && !force_off);
    if (thrash) begin n_thrash++; $display("thrash at state %0d t=%0t", state_o, $time); end
  end

  task automatic expect_seq(input int seq[], input string what);
    foreach (seq[i]) begin
      @(posedge clk);
      #1;
      checks++;
      if (state_o != 4'(seq[i])) begin
        failures++;
        $display("FAIL %s step %0d: state %0d expected %0d", what, i, state_o, seq[i]);
      end
    end
  endtask

  initial begin
    req_d = '0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    #1;
    checks++;
    if (state_o != 0 || !rd_ok || !loc_req) failures++;
    // full transition into ABC (state 8 waits for the gate)
    expect_seq('{3, 4, 5, 6, 7, 8, 8, 8, 8, 9, 10}, "FIFO to ABC");
    checks += 2;
    if (!abc_mode || !in_req) failures++;
    if (loc_req || rd_ok) failures++;
    // turn packet waits: ABC -> 1 -> (request withdrawn, gate closes) -> 2 -> FIFO
    turn_pend = 1; any_pend = 1;
    expect_seq('{1}, "leave ABC");
    wait (state_o == 2);
    @(posedge clk); #1;
    checks++;
    if (state_o != 0) failures++;
    // stays in FIFO while anything waits
    expect_seq('{0, 0, 0}, "FIFO hold");
    turn_pend = 0; any_pend = 0;
    // abort in state 4: back to FIFO in one cycle
    expect_seq('{3, 4}, "to state 4");
    any_pend = 1;
    expect_seq('{0}, "abort early");
    any_pend = 0;
    // abort in state 6: through 1 and 2, thrash counted
    expect_seq('{3, 4, 5, 6}, "to state 6");
    any_pend = 1;
    expect_seq('{1, 2, 0}, "abort late");
    checks++;
    if (n_thrash != 1) begin failures++; $display("FAIL thrash %0d", n_thrash); end
    any_pend = 0;
    // credit missing keeps the port in FIFO mode
    credit_ok = 0;
    expect_seq('{0, 0}, "no credit");
    credit_ok = 1;
    expect_seq('{3, 4, 5, 6, 7, 8, 8, 8, 8, 9, 10}, "FIFO to ABC again");
    // gate closes (bypass met missing credit): ABC -> 1
    force_off = 1;
    @(posedge clk); @(posedge clk);
    expect_seq('{1}, "gate closed");
    force_off = 0;
    // port without straight link never leaves FIFO
    wait (state_o == 0);
    abc_allowed = 0;
    expect_seq('{0, 0, 0, 0}, "no link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
