// Checks one complete router, node (3,3) of the 7x7 network, on its own. The
// testbench plays the four neighbours: each network input has its own clock
// (phase-shifted against the local clock) and a sender that honours the
// per-target credits the router returns; each network output has a
// downstream model that captures flits on the forwarded output clock, tracks
// the four downstream buffers, frees them at random and returns gray credit
// counts. The local element injects packets to random destinations and
// takes ejected packets with a random ready.
// Senders on blue inputs pick straight, turn red+, turn red- or eject as the
// first hop; red inputs pick straight or eject.
// Checked: every flit arrives exactly once at the right place (straight
// output, turn output, ejection port; for locally injected packets the route
// written at injection is walked hop by hop over the serpentine chains and
// must end at the destination), per source in order, no interleaving of
// packets on any link or at the ejection port, every forwarded header shifted
// by one hop, downstream buffers never overrun. Bypass use, FIFO-mode use and
// mode switches are counted and must all occur.
`timescale 1ns / 1ps
module tb_abc_router;
  import abc_pkg::*;
  localparam int ROWS = 7, COLS = 7, MY_R = 3, MY_C = 3, PKTS = 50, NSRC = 5;
  localparam int LOC = 4;   // source index of the local element

  logic clk_local = 0, rst_n = 1, clk_dn = 0;
  logic [3:0] in_clk = '0, out_clk, abc_mode, abc_fwd, thrash;
  logic [3:0] in_present = 4'hf;
  flit_t in_flit [4], out_flit [4];
  cred_t in_cred [4], out_cred [4];
  logic inj_valid = 0, inj_ready, ej_valid, ej_ready = 0;
  flit_t inj_flit = '0, ej_flit;
  logic [3:0] inj_dst_r = '0, inj_dst_c = '0;
  logic [3:0] my_r = 4'(MY_R), my_c = 4'(MY_C);

  abc_router #(.DEPTH(8), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  logic go = 0;
  int phase = 0;     // 0 light, 1 heavy, 2 drain
  int done_cnt = 0;

  always #5 clk_local = ~clk_local;
  always #5 clk_dn = ~clk_dn;
  for (genvar p = 0; p < 4; p++) begin : g_clk
    initial begin #(1.7 + 2.3 * p); forever #5 in_clk[p] = ~in_clk[p]; end
  end

  // expected flits: exp_out[o][src] for the output links, exp_ej[src] for ejection
  flit_t exp_out [4][NSRC][$];
  flit_t exp_ej [NSRC][$];
  int    loc_dst_o [4][$];   // destinations (r*16+c) of local packets per output

  // ------------------------------------------------------------ topology
  function automatic int red_pos(int r, int c);
    return r * COLS + ((r % 2 == 0) ? c : COLS - 1 - c);
  endfunction
  function automatic int blue_pos(int r, int c);
    return c * ROWS + ((c % 2 == 0) ? r : ROWS - 1 - r);
  endfunction
  // neighbour reached through output o; returns -1 at a chain end
  function automatic int nbr(int r, int c, int o);
    int pos, nr, nc;
    pos = (o < 2) ? blue_pos(r, c) : red_pos(r, c);
    pos = pos + ((o % 2 == 0) ? 1 : -1);
    if (pos < 0 || pos >= ROWS * COLS) return -1;
    if (o < 2) begin
      nc = pos / ROWS; nr = (nc % 2 == 0) ? pos % ROWS : ROWS - 1 - pos % ROWS;
    end else begin
      nr = pos / COLS; nc = (nr % 2 == 0) ? pos % COLS : COLS - 1 - pos % COLS;
    end
    return nr * 16 + nc;
  endfunction
  // walk a route that left this node through output o; returns final node or -1
  function automatic int walk(flit_t h, int o);
    int node, r, c;
    logic [1:0] code;
    r = MY_R; c = MY_C;
    for (int hop = 0; hop < 40; hop++) begin
      node = nbr(r, c, o);
      if (node < 0) return -1;
      r = node / 16; c = node % 16;
      code = f_code(h);
      h = f_shift(h);
      if (o < 2) begin
        if (code == C_EJECT) return node;
        else if (code == 2'b10) o = 2;
        else if (code == 2'b11) o = 3;
      end else if (code != 2'b01) return node;
    end
    return -1;
  endfunction

  function automatic flit_t mk(int src, int seq, int idx, int len, logic [1:0] c0, logic [1:0] c1);
    flit_t f;
    f = '0;
    f[FLIT_W-1] = 1;
    f[FLIT_W-2 -: 2] = (idx == 0) ? FT_HEAD : (idx == len - 1) ? FT_TAIL : FT_BODY;
    if (idx == 0) begin
      f[ROUTE_W-1 -: 2] = c0;
      f[ROUTE_W-3 -: 2] = c1;
      f[ROUTE_W-5 -: 8] = 8'($urandom);
    end
    f[47:40] = 8'(src); f[39:24] = 16'(seq); f[23:16] = 8'(idx);
    return f;
  endfunction

  // -------------------------------------------------- network senders
  flit_t nfl [4];
  assign in_flit = nfl;
  for (genvar g = 0; g < 4; g++) begin : g_src
    localparam bit BLUE = (g < 2);
    int sent [N_TGT];
    int seq = 0, idx = 0, len = 0;
    tgt_e t;
    logic [1:0] c0, c1;
    int dest;   // 0..3 output, 4 eject
    // credit counts pass a two-flop synchronizer, as in the routers
    cred_t cs1, cs2;
    always @(posedge in_clk[g]) begin cs1 <= in_cred[g]; cs2 <= cs1; end
    function automatic int ret_of(tgt_e tt);
      case (tt)
        TGT_STRAIGHT: return int'(gray2bin(cs2[CR_STR_ABC])) + int'(gray2bin(cs2[CR_STR_FIFO]));
        TGT_TURN_P:   return int'(gray2bin(cs2[CR_TURN_P]));
        TGT_TURN_M:   return int'(gray2bin(cs2[CR_TURN_M]));
        default:      return int'(gray2bin(cs2[CR_EJECT]));
      endcase
    endfunction
    initial for (int i = 0; i < N_TGT; i++) sent[i] = 0;
    always @(posedge in_clk[g] or negedge rst_n) begin
      if (!rst_n) begin
        nfl[g] <= '0;
      end else if (go) begin
        logic start;
        start = 0;
        if (idx == 0 && seq < PKTS && $urandom_range(99) < (phase == 0 ? 4 : 35)) begin
          start = 1;
          len = 2 + $urandom_range(3);
          if (BLUE) c0 = 2'($urandom_range(3)); else c0 = ($urandom_range(1) == 1) ? 2'b01 : 2'b00;
          t = code_to_tgt(c0, BLUE);
          dest = (t == TGT_STRAIGHT) ? (g ^ 1) : (t == TGT_TURN_P) ? 2 : (t == TGT_TURN_M) ? 3 : 4;
          // next hop code must be legal for the downstream input colour
          if (dest < 2) c1 = 2'($urandom_range(3)); else c1 = ($urandom_range(1) == 1) ? 2'b01 : 2'b00;
        end
        if ((idx != 0 || start) && int'(CNT_W'(sent[t] - ret_of(t))) < 8) begin
          flit_t f;
          f = mk(g, seq, idx, len, c0, c1);
          if (dest == 4) exp_ej[g].push_back(f);
          else exp_out[dest][g].push_back(f_shift(f));
          nfl[g] <= f;
          sent[t] = sent[t] + 1;
          idx++;
          if (idx == len) begin idx = 0; seq++; if (seq == PKTS) done_cnt++; end
        end else begin
          nfl[g] <= '0;
          if (start) idx = 0;   // header not sent for lack of credit; retry later
        end
      end
    end
  end

  // ------------------------------------------------------- local sender
  // drives on the falling edge; a flit is taken at a rising edge with ready
  int lseq = 0, lidx = 0, llen = 0, ldst = 0;
  logic acc = 0;
  always @(posedge clk_local) acc <= inj_valid && inj_ready;
  always @(negedge clk_local) begin
    if (go) begin
      if (acc) begin
        lidx++;
        if (lidx == llen) begin lidx = 0; lseq++; if (lseq == PKTS) done_cnt++; end
      end
      if (!inj_valid || acc) begin
        if (lseq < PKTS && (lidx != 0 || $urandom_range(99) < (phase == 0 ? 4 : 35))) begin
          if (lidx == 0) begin
            llen = 2 + $urandom_range(3);
            do ldst = $urandom_range(ROWS - 1) * 16 + $urandom_range(COLS - 1);
            while (ldst == MY_R * 16 + MY_C);
          end
          inj_flit  <= mk(LOC, lseq, lidx, llen, 2'b00, 2'b00);
          inj_dst_r <= 4'(ldst / 16);
          inj_dst_c <= 4'(ldst % 16);
          inj_valid <= 1;
        end else begin
          inj_valid <= 0;
        end
      end
    end
  end

  // ------------------------------------------------------ downstream models
  int occ [4][N_TGT], ret [4][N_TGT];
  int n_fwd = 0, n_fifo = 0, n_thrash = 0, n_enter = 0, n_ej = 0;
  for (genvar o = 0; o < 4; o++) begin : g_dn
    localparam bit DN_BLUE = (o < 2);
    flit_t held;
    logic  has_held = 0;
    int    cur_src = -1;
    tgt_e  cur_tgt = TGT_EJECT;
    initial for (int t = 0; t < N_TGT; t++) begin occ[o][t] = 0; ret[o][t] = 0; end
    always_comb begin
      out_cred[o] = '0;
      out_cred[o][CR_STR_FIFO] = bin2gray(CNT_W'(ret[o][TGT_STRAIGHT]));
      out_cred[o][CR_TURN_P]   = bin2gray(CNT_W'(ret[o][TGT_TURN_P]));
      out_cred[o][CR_TURN_M]   = bin2gray(CNT_W'(ret[o][TGT_TURN_M]));
      out_cred[o][CR_EJECT]    = bin2gray(CNT_W'(ret[o][TGT_EJECT]));
    end
    task automatic check_flit(flit_t f, int src);
      checks++;
      if (src == LOC) begin
        if (f_head(f)) begin
          int d;
          d = walk(f, o);
          if (loc_dst_o[o].size() == 0) begin failures++; $display("FAIL out %0d: unexpected local header", o); end
          else begin
            int e;
            e = loc_dst_o[o].pop_front();
            if (d != e) begin failures++; $display("FAIL out %0d: local route ends at %0h, expected %0h", o, d, e); end
          end
        end else if (exp_out[o][LOC].size() == 0 || f != exp_out[o][LOC][0]) begin
          failures++; $display("FAIL out %0d: local flit mismatch at %0t", o, $time);
        end else void'(exp_out[o][LOC].pop_front());
      end else begin
        if (src > 3 || exp_out[o][src].size() == 0 || f != exp_out[o][src][0]) begin
          failures++; $display("FAIL out %0d: flit from source %0d mismatch at %0t", o, src, $time);
        end else void'(exp_out[o][src].pop_front());
      end
    endtask
    always @(posedge out_clk[o]) begin
      if (go && f_valid(out_flit[o])) begin
        flit_t f;
        f = out_flit[o];
        if (abc_fwd[o]) n_fwd++; else n_fifo++;
        if (f_head(f)) begin
          checks++;
          if (cur_src != -1 || has_held) begin failures++; $display("FAIL out %0d: packets interleaved", o); end
          held = f; has_held = 1;
          cur_tgt = code_to_tgt(f_code(f), DN_BLUE);
        end else begin
          int src;
          src = int'(f[47:40]);
          if (has_held) begin
            cur_src = src;
            check_flit(held, src);
            has_held = 0;
          end
          checks++;
          if (src != cur_src) begin failures++; $display("FAIL out %0d: packets interleaved", o); end
          check_flit(f, src);
          if (f_tail(f)) cur_src = -1;
        end
        occ[o][cur_tgt]++;
        checks++;
        if (occ[o][cur_tgt] > 8) begin failures++; $display("FAIL out %0d: downstream buffer overrun", o); end
      end
    end
    always @(posedge clk_dn) begin
      for (int t = 0; t < N_TGT; t++)
        if (occ[o][t] > 0 && $urandom_range(99) < (phase == 1 ? 30 : 90)) begin
          occ[o][t]--;
          ret[o][t]++;
        end
    end
  end

  // local flits: sort into the expected output once the route is known.
  // The injected header carries the route in the same clock the flit is
  // accepted, so the first hop code is taken from the router's route unit.
  int loc_out = 0;
  always @(posedge clk_local) begin
    if (inj_valid && inj_ready) begin
      if (f_head(inj_flit)) begin
        logic [1:0] c;
        c = dut.u_inj.route[ROUTE_W-1 -: 2];
        loc_out = (c == 2'b11) ? 0 : (c == 2'b01) ? 1 : (c == 2'b10) ? 2 : 3;
        loc_dst_o[loc_out].push_back(inj_dst_r * 16 + inj_dst_c);
      end else begin
        exp_out[loc_out][LOC].push_back(f_shift(inj_flit));
      end
    end
  end

  // ------------------------------------------------------------ ejection
  int ej_src = -1;
  always @(posedge clk_local) begin
    ej_ready <= ($urandom_range(99) < 70);
    if (go && ej_valid && ej_ready) begin
      int src;
      src = int'(ej_flit[47:40]);
      n_ej++;
      checks++;
      if (src > 3 || exp_ej[src].size() == 0 || ej_flit != exp_ej[src][0]) begin
        failures++; $display("FAIL eject: flit from %0d mismatch at %0t", src, $time);
      end else void'(exp_ej[src].pop_front());
      checks++;
      if (f_head(ej_flit)) begin
        if (ej_src != -1) begin failures++; $display("FAIL eject: packets interleaved"); end
        ej_src = src;
      end else if (src != ej_src) begin failures++; $display("FAIL eject: packets interleaved"); end
      if (f_tail(ej_flit)) ej_src = -1;
    end
  end

  logic [3:0] prev_mode = '0;
  always @(posedge clk_local) begin
    for (int o = 0; o < 4; o++) begin
      if (abc_mode[o] && !prev_mode[o]) n_enter++;
      if (thrash[o]) n_thrash++;
    end
    prev_mode <= abc_mode;
  end

  initial begin
    $assertoff;
    #1 rst_n = 0;
    #20 rst_n = 1;
    $asserton;
    go = 1;
    repeat (1500) @(posedge clk_local);
    phase = 1;
    wait (done_cnt == 5);
    phase = 2;
    repeat (500) @(posedge clk_local);
    for (int s = 0; s < NSRC; s++) begin
      checks++;
      if (exp_ej[s].size() != 0) begin failures++; $display("FAIL eject: %0d flits of source %0d missing", exp_ej[s].size(), s); end
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (exp_out[o][s].size() != 0) begin failures++; $display("FAIL out %0d: %0d flits of source %0d missing", o, exp_out[o][s].size(), s); end
      end
    end
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (loc_dst_o[o].size() != 0) begin failures++; $display("FAIL out %0d: local headers missing", o); end
    end
    $display("bypass %0d FIFO %0d ejected %0d enter-ABC %0d thrash %0d", n_fwd, n_fifo, n_ej, n_enter, n_thrash);
    checks += 3;
    if (n_fwd == 0) failures++;
    if (n_fifo == 0) failures++;
    if (n_enter == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("FAIL watchdog (done %0d)", done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
