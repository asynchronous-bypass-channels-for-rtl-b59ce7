// Checks the bi-synchronous FIFO with unrelated write and read clocks
// (periods 10 and 13 ns): every word comes out once and in order, full and
// empty hold the writer and the reader back, the read side never sees a word
// earlier than two read edges after it was written, and wempty only shows
// when the FIFO really is empty.
`timescale 1ns / 1ps
module tb_abc_bi_fifo;
  localparam int W = 16;
  logic wclk = 0, rclk = 0, rst_n = 1;
  logic want = 0, wr_en, rd_en = 0, wfull, wempty, rempty;
  assign wr_en = want && !wfull;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int wcount = 0, rcount = 0, nfull = 0;
  logic [W-1:0] q [$];

  abc_bi_fifo #(.DEPTH(8), .W(W)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  always @(posedge wclk) begin
    if (rst_n) begin
      if (wr_en && !wfull) begin
        q.push_back(wdata);
        wcount++;
      end
      if (wfull) nfull++;
      want <= (wcount < 300) && ($urandom_range(99) < 80);
      wdata <= W'($urandom);
    end
  end


  always @(posedge rclk) begin
    if (rst_n) begin
      if (rd_en && !rempty) begin
        checks++;
        if (q.size() == 0 || rdata !== q[0]) begin
          failures++;
          $display("FAIL read %0h", rdata);
        end else begin
          void'(q.pop_front());
        end
        rcount++;
      end
      rd_en <= (rcount < 150) ? ($urandom_range(99) < 40) : 1'b1;
    end
  end

  // wempty must never show while a word is stored
  always @(posedge wclk) begin
    if (rst_n && wempty && q.size() != 0 && !(rd_en && !rempty)) begin
      checks++;
      if (dut.wbin != dut.rbin) begin
        failures++;
        $display("FAIL wempty with data stored");
      end
    end
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(posedge wclk);
    wait (rcount == 300 && wcount == 300);
    checks += 2;
    if (q.size() != 0) failures++;
    if (nfull == 0) begin
      failures++;
      $display("FAIL FIFO never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
