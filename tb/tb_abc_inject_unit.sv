// Checks the local injection unit at node (0,4) of a 7 x 7 network: a header
// sent to (1,1) leaves with the route of the routing example (11 10 01 01 00),
// each packet is offered to the output its first code names (blue+, blue-,
// red+ or red-) and to no other, flits leave in order, body flits keep their
// payload, and inj_ready falls when the eight-entry FIFO is full.
`timescale 1ns / 1ps
module tb_abc_inject_unit;
  import abc_pkg::*;
  logic clk = 0, rst_n = 1;
  logic inj_valid = 0, inj_ready;
  flit_t inj_flit = '0, head;
  logic [3:0] inj_dst_r = 0, inj_dst_c = 0, req, pop;
  int checks = 0, failures = 0, n_full = 0;
  flit_t q [$];
  int qport [$];

  abc_inject_unit #(.DEPTH(8)) dut (.clk, .rst_n, .my_r(4'd0), .my_c(4'd4), .inj_valid, .inj_flit,
    .inj_dst_r, .inj_dst_c, .inj_ready, .req, .head, .pop);

  always #5 clk = ~clk;

  // port of the first code: 11 blue+ (0), 01 blue- (1), 10 red+ (2), 00 red- (3)
  function automatic int port_of(logic [1:0] c);
    case (c) 2'b11: return 0; 2'b01: return 1; 2'b10: return 2; default: return 3; endcase
  endfunction

  logic pop_en = 0;
  assign pop = pop_en ? req : 4'b0;
  always @(posedge clk) pop_en <= ($urandom_range(1) == 1);

  int cur_port = 0;
  bit first_pkt = 1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!inj_ready) n_full++;
      if (|pop) begin
        checks += 2;
        if (q.size() == 0 || (f_head(head) ? head[FLIT_W-2:ROUTE_W] != q[0][FLIT_W-2:ROUTE_W]
                                           : head[FLIT_W-2:0] != q[0][FLIT_W-2:0])) begin
          failures++; $display("FAIL flit out of order");
        end
        if (f_head(head)) cur_port = port_of(f_code(head));
        if (f_head(head) && first_pkt) begin
          first_pkt = 0;
          checks++;
          if (head[ROUTE_W-1:0] != {10'b11_10_01_01_00, {(ROUTE_W - 10){1'b0}}}) begin
            failures++; $display("FAIL example route %b", head[ROUTE_W-1 -: 10]);
          end
        end
        if (req != (4'b1 << cur_port)) begin failures++; $display("FAIL req %b port %0d", req, cur_port); end
        if (q.size() != 0) void'(q.pop_front());
      end
    end
  end

  task automatic send_pkt(int dr, int dc, int len);
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f = '0;
      f[FLIT_W-1] = 1'b1;
      f[FLIT_W-2 -: 2] = (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
      f[31:0] = $urandom;
      @(negedge clk);
      inj_flit = f; inj_dst_r = 4'(dr); inj_dst_c = 4'(dc); inj_valid = 1;
      while (!inj_ready) @(negedge clk);
      @(posedge clk);
      q.push_back(f);
    end
    @(negedge clk);
    inj_valid = 0;
  endtask

  initial begin
    #1 rst_n = 0;
    #12 rst_n = 1;
    @(posedge clk);
    send_pkt(1, 1, 3);
    for (int p = 0; p < 100; p++) begin
      int d;
      do d = $urandom_range(48); while (d == 4);
      send_pkt(d / 7, d % 7, 2 + $urandom_range(3));
    end
    repeat (50) @(posedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL %0d flits left", q.size()); end
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
