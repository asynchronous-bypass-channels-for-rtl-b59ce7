// Runs the two permutation workloads on the full 7 x 7 network at its default
// size: transpose, where node (r,c) sends to (c,r), and bit complement, where
// node (r,c) sends to (6-r, 6-c) (the complement within the 0..6 coordinate
// range). Nodes whose partner is themselves stay silent. Each node runs its own
// phase-shifted clock, starts a packet of two to five flits with 3 %
// probability per cycle until it has sent its share, and the network is
// drained before the next pattern starts. The same scoreboard as the random
// traffic test checks that every packet arrives once, at the right node, in
// order and unmixed, with its route consumed. For each pattern the testbench
// prints the mean latency from the cycle a packet is offered to the cycle its
// tail is ejected, and the counts of bypassed and buffered flit hops and turn
// routes; a pattern with no bypassed flit counts as a failure, and so does a
// transpose run without turns (transpose packets mostly have to turn).
// Patterns and packet lengths follow the evaluation this network was designed
// for; the injection rate, packet counts and the 6-x complement are this
// testbench's choices.
`timescale 1ns / 1ps
module tb_abc_noc_patterns;
  import abc_pkg::*;

  localparam int ROWS = 7, COLS = 7, N = ROWS * COLS;
  localparam int PERIOD_PS = 10000;
  localparam int PKTS = 12;   // packets per node per pattern

  logic [N-1:0] clk = '0;
  logic         rst_n = 1'b1;
  logic [N-1:0] inj_valid = '0, inj_ready, ej_valid, ej_ready = '0;
  flit_t        inj_flit [N];
  logic [3:0]   inj_dst_r [N], inj_dst_c [N];
  flit_t        ej_flit [N];
  logic [3:0]   abc_mode [N], abc_fwd [N], thrash [N];

  abc_noc dut (.*);

  int checks = 0, failures = 0;
  int sent_pkts = 0, recv_pkts = 0;
  int n_fwd = 0, n_fifo_send = 0, n_enter = 0, n_leave = 0, n_thrash = 0, n_turn = 0, n_stop = 0;
  int exp_dst [int];
  int exp_len [int];
  bit phase_high = 0, stop_inj = 0;
  int pattern = 0;   // 0 transpose, 1 bit complement
  realtime t_start [int];
  real lat_sum = 0.0;
  int  lat_cnt = 0;
  int done_nodes = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  for (genvar n = 0; n < N; n++) begin : g_clk
    initial begin
      #((n * 1373 % PERIOD_PS) * 1ps);
      forever #(PERIOD_PS / 2 * 1ps) clk[n] = ~clk[n];
    end
  end

  // -------------------------------------------------------------- sources
  for (genvar n = 0; n < N; n++) begin : g_src
    int seq = 0, left = 0, idx = 0, len = 0, dst = 0, pid = 0, cnt = 0;
    always @(posedge clk[n]) begin
      if (rst_n && !stop_inj) begin
        if (inj_valid[n] && inj_ready[n]) begin
          idx++;
          if (idx == len) begin
            inj_valid[n] <= 1'b0;
            left = 0;
          end
        end
        if (left == 0 || (idx == len)) begin
          dst = (pattern == 0) ? (n % COLS) * COLS + n / COLS
                               : (ROWS - 1 - n / COLS) * COLS + (COLS - 1 - n % COLS);
          if (phase_high && dst != n && cnt < PKTS * (pattern + 1) && $urandom_range(99) < 3) begin
            len = 2 + $urandom_range(3);
            pid = n * 65536 + seq;
            seq++;
            cnt++;
            idx = 0;
            left = 1;
            exp_dst[pid] = dst;
            exp_len[pid] = len;
            t_start[pid] = $realtime;
            sent_pkts++;
          end else begin
            left = 0;
            inj_valid[n] <= 1'b0;
          end
        end
        if (left != 0) begin
          flit_t f;
          f = '0;
          f[FLIT_W-1] = 1'b1;
          f[FLIT_W-2 -: 2] = (idx == 0) ? FT_HEAD : (idx == len - 1) ? FT_TAIL : FT_BODY;
          f[63:32] = pid;
          f[31:24] = 8'(idx);
          f[23:16] = 8'(len);
          f[15:0]  = 16'(dst);
          inj_flit[n]  <= f;
          inj_dst_r[n] <= 4'(dst / COLS);
          inj_dst_c[n] <= 4'(dst % COLS);
          inj_valid[n] <= 1'b1;
          if (idx == 0 && dut.g_node[n].u_router.u_inj.path == 2'd2 && inj_ready[n]) n_turn++;
        end
      end else begin
        inj_valid[n] <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- sinks
  for (genvar n = 0; n < N; n++) begin : g_sink
    int cur = -1, exp_idx = 0, len = 0;
    always @(posedge clk[n]) begin
      ej_ready[n] <= 1'b1;
      if (rst_n && ej_valid[n] && ej_ready[n]) begin
        flit_t f;
        f = ej_flit[n];
        checks++;
        if (f_head(f)) begin
          if (cur != -1) fail($sformatf("node %0d: header inside packet %0h", n, cur));
          if (f[ROUTE_W-1:0] != '0) fail($sformatf("node %0d: header route not consumed", n));
          cur = -2;
          exp_idx = 1;
        end else begin
          if (cur == -1) fail($sformatf("node %0d: body without header", n));
          if (cur == -2) begin
            cur = int'(f[63:32]);
            if (!exp_dst.exists(cur)) begin
              fail($sformatf("node %0d: unknown or duplicate packet %0h", n, cur));
            end else begin
              if (exp_dst[cur] != n) fail($sformatf("node %0d: packet %0h for %0d", n, cur, exp_dst[cur]));
              len = exp_len[cur];
            end
          end
          if (int'(f[63:32]) != cur) fail($sformatf("node %0d: flits of packets mixed", n));
          if (int'(f[31:24]) != exp_idx) fail($sformatf("node %0d: flit %0d, expected %0d", n, f[31:24], exp_idx));
          exp_idx++;
          if (f_tail(f)) begin
            if (exp_idx != len) fail($sformatf("node %0d: packet %0h short", n, cur));
            if (exp_dst.exists(cur)) begin
              exp_dst.delete(cur);
              exp_len.delete(cur);
              lat_sum += ($realtime - t_start[cur]) / (PERIOD_PS * 1ps);
              lat_cnt++;
            end
            recv_pkts++;
            cur = -1;
          end
        end
      end
    end
  end

  // ------------------------------------------------- mechanism counters
  for (genvar n = 0; n < N; n++) begin : g_mon
    for (genvar o = 0; o < 4; o++) begin : g_port
      logic prev_mode = 1'b0;
      always @(posedge dut.oclk[n][o]) begin
        if (rst_n && abc_fwd[n][o]) n_fwd++;
        if (rst_n && !abc_fwd[n][o] && f_valid(dut.oflit[n][o])) n_fifo_send++;
      end
      always @(posedge clk[n]) begin
        if (rst_n) begin
          if (abc_mode[n][o] && !prev_mode) n_enter++;
          if (!abc_mode[n][o] && prev_mode) n_leave++;
          if (thrash[n][o]) n_thrash++;
          prev_mode <= abc_mode[n][o];
        end
      end
      always @(posedge dut.iclk[n][o ^ 1]) begin
        if (rst_n && dut.g_node[n].u_router.g_out[o].u_out.s_stop) n_stop++;
      end
    end
  end

  // ------------------------------------------------------------ control
  initial begin
    $assertoff;  // state is random until the reset pulse
    #1ns rst_n = 1'b0;
    repeat (5) @(posedge clk[0]);
    rst_n = 1'b1;
    $asserton;
    for (int p = 0; p < 2; p++) begin
      int f0, t0;
      pattern = p;
      f0 = n_fwd; t0 = n_turn;
      lat_sum = 0.0; lat_cnt = 0;
      phase_high = 1;
      repeat (3000) @(posedge clk[0]);
      phase_high = 0;
      repeat (1500) @(posedge clk[0]);
      checks += 2;
      if (exp_dst.num() != 0) fail($sformatf("%0d packets not delivered", exp_dst.num()));
      $display("%s: %0d packets, mean latency %0.2f cycles, bypassed flit hops %0d, FIFO-mode flit hops so far %0d, turn routes %0d",
               p == 0 ? "transpose" : "bit complement", lat_cnt, lat_cnt ? lat_sum / lat_cnt : 0.0,
               n_fwd - f0, n_fifo_send, n_turn - t0);
      if (n_fwd == f0) fail("no bypass forwarding");
      if (p == 0) begin checks++; if (n_turn == t0) fail("transpose without turns"); end
    end
    $display("sent %0d packets, received %0d; enter ABC %0d, leave ABC %0d, thrash %0d, credit stops %0d",
             sent_pkts, recv_pkts, n_enter, n_leave, n_thrash, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD_PS * 20000 * 1ps);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
