// Checks the output clock control with a local clock and an incoming clock of
// the same period and a 3 ns phase shift. The output clock must equal the
// local clock while the local enable is on, the incoming clock while the
// incoming gate is open and stay high otherwise; the two are never on together;
// no two rising edges of the output come closer than one period; a request
// opens the gate only with start_ok, stop closes it at the next incoming edge,
// and the synchronized status and acknowledge follow two local edges later.
`timescale 1ns / 1ps
module tb_abc_ccontrol;
  logic clk_local = 0, clk_in = 0, rst_n = 1;
  logic loc_req = 1, in_req = 0, start_ok = 0, stop = 0;
  logic loc_on, in_on, in_on_l, in_busy_l, in_ack_l, clk_out;
  int checks = 0, failures = 0, n_in_edges = 0, n_loc_edges = 0;
  realtime last_rise = 0;

  abc_ccontrol dut (.*);

  always #5 clk_local = ~clk_local;
  initial begin #3; forever #5 clk_in = ~clk_in; end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  always @(clk_out or clk_local or clk_in) begin
    #0.01;
    if (rst_n) begin
      check(!(loc_on && in_on), "both enabled");
      if (loc_on) check(clk_out == clk_local, "output is not the local clock");
      else if (in_on) check(clk_out == clk_in, "output is not the incoming clock");
      else check(clk_out == 1'b1, "output not held high");
    end
  end

  always @(posedge clk_out) begin
    if (rst_n && last_rise > 0) check($realtime - last_rise > 9.9, "rising edges too close");
    last_rise = $realtime;
    if (in_on) n_in_edges++;
    if (loc_on) n_loc_edges++;
  end

  task automatic to_incoming(input int wait_ok);
    @(posedge clk_local) loc_req <= 0;
    repeat (2) @(posedge clk_local);
    in_req <= 1;
    repeat (wait_ok) @(posedge clk_in);
    check(!in_on, "gate opened without start_ok");
    start_ok <= 1;
    repeat (4) @(posedge clk_in);
    check(in_on, "gate did not open");
    repeat (3) @(posedge clk_local);
    check(in_on_l && in_ack_l && in_busy_l, "status not synchronized");
  endtask

  task automatic to_local();
    @(posedge clk_local);
    in_req <= 0;
    wait (!in_busy_l);
    @(posedge clk_local);
    check(!in_on, "gate still open");
    loc_req <= 1;
  endtask

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    repeat (5) @(posedge clk_local);
    to_incoming(3);
    repeat (10) @(posedge clk_in);
    to_local();
    repeat (10) @(posedge clk_local);
    to_incoming(0);
    // stop: the gate closes at the next incoming edge
    @(posedge clk_in) stop <= 1;
    @(posedge clk_in);
    #0.1 check(!in_on, "stop did not close the gate");
    stop <= 0;
    repeat (5) @(posedge clk_in);
    check(!in_on, "gate reopened before the request dropped");
    repeat (3) @(posedge clk_local);
    check(!in_on_l, "closed gate not reported");
    to_local();
    repeat (10) @(posedge clk_local);
    check(n_in_edges > 10 && n_loc_edges > 10, "both clocks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
