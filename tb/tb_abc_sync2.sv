// Checks the two flip-flop synchronizer: output equals the input of two
// rising clock edges earlier, and reset clears it.
`timescale 1ns / 1ps
module tb_abc_sync2;
  logic clk = 0, rst_n = 1;
  logic [3:0] d = '0, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  abc_sync2 #(.W(4)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    checks++;
    if (q !== 4'd0) failures++;
    for (int i = 0; i < 3; i++) hist[i] = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("FAIL cycle %0d q=%0h expected %0h", i, q, hist[1]);
        end
      end
      hist[2] = hist[1];
      hist[1] = hist[0];
      d = 4'($urandom);
      hist[0] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
