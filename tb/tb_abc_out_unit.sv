// Checks an output block B (red output) on its own. Four sources feed it: the
// straight input (incoming clock, phase 3.1 ns), the two blue turn inputs
// (their own clocks) and the local input (local clock); each sender respects
// the credits the block returns. A downstream model captures the output on
// the forwarded output clock, keeps its straight and ejection buffers, frees
// them at random and returns credits as gray counts.
// Phases: light straight traffic; busier straight traffic with a slow
// downstream; all four sources at high rate; drain.
// Checked: every flit arrives exactly once, per source in order, packets are
// never interleaved on the link, every header leaves with its route shifted
// by one hop, the downstream buffers are never overrun, a flit taken by the
// bypass leaves in the same incoming-clock edge it arrives (zero added
// cycles), and the block both forwards on the bypass (light straight load)
// and switches to FIFO mode (turn and local packets, slow downstream),
// including aborted switches and bypass stops for lack of credit.
`timescale 1ns / 1ps
module tb_abc_out_unit;
  import abc_pkg::*;
  logic clk_local = 0, rst_n = 1, clk_s = 0, clk_t0 = 0, clk_t1 = 0, clk_dn = 0;
  flit_t flit_s, flit_t0, flit_t1, loc_head, flit_out;
  logic v_s, v_t0, v_t1, loc_req, loc_pop, clk_out;
  cred_t cred_in = '0;
  logic [CNT_W-1:0] cr_str_abc, cr_str_fifo, cr_t0, cr_t1;
  logic abc_mode, abc_fwd, thrash;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_fifo = 0, n_enter = 0, n_thrash = 0, n_stop = 0;
  logic go = 0;     // set once reset has been applied
  int phase = 0;
  logic slow = 0;   // second half of phase 0: busier straight input, slow downstream   // 0 light straight only, 1 heavy mixed, 2 drain
  flit_t expq [4][$];
  int done_src [4];
  localparam int PKTS = 60;

  abc_out_unit #(.IS_RED(1'b1), .DEPTH(8)) dut (.*, .s_present(1'b1));

  assign v_s  = f_valid(flit_s);
  assign v_t0 = f_valid(flit_t0);
  assign v_t1 = f_valid(flit_t1);

  always #5 clk_local = ~clk_local;
  initial begin #3.1; forever #5 clk_s = ~clk_s; end
  initial begin #6.3; forever #5 clk_t0 = ~clk_t0; end
  initial begin #8.7; forever #5 clk_t1 = ~clk_t1; end
  initial begin #4.4; forever #5 clk_dn = ~clk_dn; end

  function automatic flit_t mk(int src, int seq, int idx, int len);
    flit_t f;
    f = '0;
    f[FLIT_W-1] = 1;
    f[FLIT_W-2 -: 2] = (idx == 0) ? FT_HEAD : (idx == len - 1) ? FT_TAIL : FT_BODY;
    if (idx == 0) begin
      f[ROUTE_W-1 -: 2] = 2'b01;                            // this hop
      f[ROUTE_W-3 -: 2] = ($urandom_range(1) == 1) ? 2'b01 : 2'b00;  // next hop
      f[ROUTE_W-5 -: 8] = 8'($urandom);
    end
    f[47:40] = 8'(src); f[39:24] = 16'(seq); f[23:16] = 8'(idx);
    return f;
  endfunction

  // ---------------------------------------------------- network senders
  // index 0 straight (sources 0), 1 turn from blue+ (source 2), 2 from blue- (3)
  logic [2:0] nclk;
  flit_t nfl [3];
  logic [CNT_W-1:0] nret [3];
  assign nclk = {clk_t1, clk_t0, clk_s};
  assign flit_s  = nfl[0];
  assign flit_t0 = nfl[1];
  assign flit_t1 = nfl[2];
  assign nret[0] = gray2bin(cr_str_abc) + gray2bin(cr_str_fifo);
  assign nret[1] = gray2bin(cr_t0);
  assign nret[2] = gray2bin(cr_t1);

  for (genvar g = 0; g < 3; g++) begin : g_src
    localparam int SRC = (g == 0) ? 0 : g + 1;
    int sent = 0, seq = 0, idx = 0, len = 0;
    always @(posedge nclk[g] or negedge rst_n) begin
      if (!rst_n) begin
        nfl[g] <= '0;
      end else begin
        if (f_valid(nfl[g])) sent = sent + 1;
        if (seq < PKTS && (phase > 0 || SRC == 0) &&
            int'(CNT_W'(CNT_W'(sent) - nret[g])) < 7 &&
            (idx != 0 || $urandom_range(99) < (phase == 0 ? (slow ? 15 : 5) : 40))) begin
          flit_t f;
          if (idx == 0) len = 2 + $urandom_range(3);
          f = mk(SRC, seq, idx, len);
          expq[SRC].push_back(f_shift(f));
          nfl[g] <= f;
          idx++;
          if (idx == len) begin idx = 0; seq++; if (seq == PKTS) done_src[SRC] = 1; end
        end else begin
          nfl[g] <= '0;
        end
      end
    end
  end

  // ---------------------------------------------------------- local sender
  flit_t lq [$];
  int lseq = 0, lidx = 0, llen = 0;
  assign loc_req  = lq.size() != 0;
  assign loc_head = lq.size() != 0 ? lq[0] : '0;
  always @(posedge clk_local) begin
    if (go) begin
      if (loc_pop) void'(lq.pop_front());
      if (phase > 0 && lseq < PKTS && lq.size() < 8 && (lidx != 0 || $urandom_range(99) < 30)) begin
        flit_t f;
        if (lidx == 0) llen = 2 + $urandom_range(3);
        f = mk(1, lseq, lidx, llen);
        lq.push_back(f);
        expq[1].push_back(f_shift(f));
        lidx++;
        if (lidx == llen) begin lidx = 0; lseq++; if (lseq == PKTS) done_src[1] = 1; end
      end
    end
  end

  // -------------------------------------------------------- downstream
  int occ [2], ret [2];
  int link_src = -1;
  int pkt_tgt = 0;
  always @(posedge clk_out) begin
    if (go && f_valid(flit_out)) begin
      int src, t;
      src = f_head(flit_out) ? int'(flit_out[49:42]) : int'(flit_out[47:40]);  // header route field is shifted
      checks++;
      if (src > 3 || expq[src].size() == 0 || flit_out != expq[src][0]) begin
        failures++;
        $display("FAIL unexpected flit from %0d at %0t", src, $time);
      end else void'(expq[src].pop_front());
      if (f_head(flit_out)) begin
        if (link_src != -1) begin failures++; $display("FAIL packets interleaved"); end
        link_src = src;
        pkt_tgt = (f_code(flit_out) == 2'b01) ? 0 : 1;
      end else if (src != link_src) begin
        failures++; $display("FAIL packets interleaved");
      end
      if (f_tail(flit_out)) link_src = -1;
      occ[pkt_tgt]++;
      checks++;
      if (occ[pkt_tgt] > 8) begin failures++; $display("FAIL downstream buffer overrun"); end
      if (abc_fwd) begin
        n_fwd++;
        checks++;
        if (flit_out != f_shift(flit_s)) begin failures++; $display("FAIL bypass flit is not the incoming flit"); end
      end else n_fifo++;
    end
  end
  always @(posedge clk_dn) begin
    for (int t = 0; t < 2; t++) begin
      if (occ[t] > 0 && $urandom_range(99) < (phase == 1 || slow ? 25 : 90)) begin
        occ[t]--;
        ret[t]++;
        cred_in[t == 0 ? CR_STR_FIFO : CR_EJECT] <= bin2gray(CNT_W'(ret[t]));
      end
    end
  end

  logic prev_mode = 0;
  always @(posedge clk_local) begin
    if (abc_mode && !prev_mode) n_enter++;
    prev_mode <= abc_mode;
    if (thrash) n_thrash++;
  end
  always @(posedge clk_s) if (dut.s_stop) n_stop++;

  initial begin
    for (int i = 0; i < 4; i++) done_src[i] = 0;
    occ[0] = 0; occ[1] = 0; ret[0] = 0; ret[1] = 0;
    $assertoff;
    #1 rst_n = 0;
    #20 rst_n = 1;
    go = 1;
    $asserton;
    repeat (600) @(posedge clk_local);
    slow = 1;
    repeat (600) @(posedge clk_local);
    slow = 0;
    phase = 1;
    wait (done_src[0] && done_src[1] && done_src[2] && done_src[3]);
    phase = 2;
    repeat (400) @(posedge clk_local);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("FAIL source %0d: %0d flits missing", i, expq[i].size()); end
    end
    $display("bypass %0d FIFO %0d enter-ABC %0d thrash %0d credit-stops %0d", n_fwd, n_fifo, n_enter, n_thrash, n_stop);
    checks += 4;
    if (n_fwd == 0) failures++;
    if (n_fifo == 0) failures++;
    if (n_enter == 0) failures++;
    if (n_thrash + n_stop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("FAIL watchdog: left %0d %0d %0d %0d done %p occ %p state %0d phase %0d", expq[0].size(), expq[1].size(),
             expq[2].size(), expq[3].size(), done_src, occ, dut.fsm_state, phase);
    $display("has %b in_on %b sf_empty %b strw %b cr %0d %0d %0d %0d", dut.has, dut.in_on, dut.sf_empty, dut.str_wempty, cr_str_abc, cr_str_fifo, cr_t0, cr_t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
