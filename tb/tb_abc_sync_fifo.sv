// Checks the straight-path sync-FIFO: flits tagged as forwarded on the bypass
// are flushed and never reach the bi-FIFO side; untagged flits come out once
// and in order, held while out_ready is low; each entry leaves one edge after
// it was written at the earliest.
`timescale 1ns / 1ps
module tb_abc_sync_fifo;
  localparam int W = 16;
  logic clk = 0, rst_n = 1;
  logic push = 0, fwd = 0, out_valid, out_ready = 0, empty, full;
  logic [W-1:0] din = '0, out_data;
  int checks = 0, failures = 0, kept = 0, flushed = 0, got = 0;
  logic [W-1:0] q [$];

  abc_sync_fifo #(.DEPTH(4), .W(W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        got++;
        if (q.size() == 0 || out_data !== q[0]) begin
          failures++;
          $display("FAIL got %0h", out_data);
        end else void'(q.pop_front());
      end
      if (push) begin
        if (fwd) flushed++;
        else begin
          q.push_back(din);
          kept++;
        end
      end
      out_ready <= $urandom_range(99) < 70;
      // push only when there is room for the worst case
      push <= !full && dut.wp - dut.rp < 3 && (kept + flushed < 400) && ($urandom_range(99) < 60);
      fwd  <= $urandom_range(1);
      din  <= W'($urandom);
    end
  end

  initial begin
    #1 rst_n = 0;
    #12 rst_n = 1;
    // first entry: not visible before the edge that writes it
    checks++;
    if (out_valid) failures++;
    wait (kept + flushed >= 400);
    repeat (20) @(posedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL %0d flits lost", q.size()); end
    if (got != kept) failures++;
    if (!empty) failures++;
    $display("kept %0d flushed %0d", kept, flushed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
