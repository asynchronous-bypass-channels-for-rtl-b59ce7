// Output block of a chain output: block A (blue output, IS_RED = 0) or
// block B (red output, IS_RED = 1).
//
// The block joins the straight input of its chain (the opposite port of the
// same colour), the local input and, for a red output only, the two blue
// inputs turning onto red. It has two modes (see abc_out_fsm):
//  * ABC mode: a straight flit goes combinationally from the input to the
//    output (the asynchronous bypass channel), with the incoming clock
//    forwarded as output clock. Nothing is latched on the way; a copy is
//    latched in the sync-FIFO and flushed. The credit for the downstream
//    router's buffer is taken in that same clock, and the credit of this
//    router's straight buffer is returned to the upstream router at once.
//  * FIFO mode: flits are read in the local clock from the straight bi-FIFO,
//    the turn bi-FIFOs and the local injection FIFO, one packet at a time, in
//    round robin (the straight bi-FIFO first after a switch out of ABC mode),
//    registered in an output register and sent with the local clock.
// A straight flit the bypass cannot take (no credit, port not in ABC mode)
// stays in the sync-FIFO and moves on to the straight bi-FIFO; the incoming
// clock gate (abc_ccontrol) closes at that edge, which tells the FSM to leave
// ABC mode. Every header leaving the block has its route shifted by one hop.
// Timing: a flit arriving at incoming edge t is captured downstream at edge t
// in ABC mode (no cycle added); in FIFO mode it is written at t, visible to
// the reader two to three local edges later, then registered once.
// Credit-return counts for the upstream routers leave on cr_*.
// The document gives the datapath, the modes, the FSM and round robin; the
// packet lock, the output register and the credit return format are this
// design's choices.
module abc_out_unit #(
  parameter bit          IS_RED = 1'b0,
  parameter int unsigned DEPTH  = 8
) (
  input  logic           clk_local,
  input  logic           rst_n,
  // straight input (opposite port of the same chain)
  input  logic           clk_s,
  input  abc_pkg::flit_t flit_s,
  input  logic           v_s,
  input  logic           s_present, // the straight input has a link
  // turn inputs (red outputs only): t0 from the blue+ input, t1 from blue-
  input  logic           clk_t0,
  input  abc_pkg::flit_t flit_t0,
  input  logic           v_t0,
  input  logic           clk_t1,
  input  abc_pkg::flit_t flit_t1,
  input  logic           v_t1,
  // local input
  input  logic           loc_req,
  input  abc_pkg::flit_t loc_head,
  output logic           loc_pop,
  // output link
  output logic           clk_out,
  output abc_pkg::flit_t flit_out,
  input  abc_pkg::cred_t cred_in,
  // credit return counts towards the upstream routers
  output logic [abc_pkg::CNT_W-1:0] cr_str_abc,
  output logic [abc_pkg::CNT_W-1:0] cr_str_fifo,
  output logic [abc_pkg::CNT_W-1:0] cr_t0,
  output logic [abc_pkg::CNT_W-1:0] cr_t1,
  // status
  output logic           abc_mode,
  output logic           abc_fwd,   // a flit took the bypass at this clk_s edge
  output logic           thrash
);
  import abc_pkg::*;

  localparam int unsigned NSRC = 4;
  localparam int unsigned S_STR = 0, S_LOC = 1, S_T0 = 2, S_T1 = 3;
  localparam bit DN_BLUE = !IS_RED;  // colour of the downstream input

  // ---------------------------------------------------------------- credits
  logic [N_TGT-1:0][CNT_W-1:0] avail;
  logic  send;
  tgt_e  send_tgt;
  logic  credit_all_ok;

  abc_credit_ctrl #(.DEPTH(DEPTH)) u_cred (
    .clk(clk_out), .rst_n, .cred_in, .send, .send_tgt, .avail
  );

  always_comb begin
    credit_all_ok = 1'b1;
    for (int t = 0; t < N_TGT; t++) if (avail[t] == '0) credit_all_ok = 1'b0;
  end

  // --------------------------------------------------- packet ownership
  // Updated at the output clock edge a flit is captured downstream.
  logic  pkt_active;
  logic [1:0] pkt_src;
  tgt_e  pkt_tgt;
  logic [1:0] out_src;
  tgt_e  out_tgt;
  flit_t out_reg;

  // ---------------------------------------------------- incoming side
  logic  in_on, loc_on, in_on_l, in_busy_l, in_ack_l;
  logic  loc_req_fsm, in_req_fsm, rd_ok;
  tgt_e  s_tgt;
  logic  abc_pass, s_stop, start_ok;
  logic  sf_out_valid, sf_empty, sf_full;
  flit_t sf_out_data;
  logic  str_wfull, str_wempty, str_rempty;

  assign s_tgt    = f_head(flit_s) ? code_to_tgt(f_next_code(flit_s), DN_BLUE) : pkt_tgt;
  assign abc_pass = in_on && v_s && (avail[s_tgt] != '0);
  assign s_stop   = in_on && v_s && (avail[s_tgt] == '0);
  assign start_ok = sf_empty && str_wempty && !v_s && credit_all_ok;
  assign abc_fwd  = abc_pass;

  abc_sync_fifo u_sync (
    .clk(clk_s), .rst_n, .push(v_s), .din(flit_s), .fwd(abc_pass),
    .out_valid(sf_out_valid), .out_data(sf_out_data), .out_ready(!str_wfull),
    .empty(sf_empty), .full(sf_full)
  );

  abc_gray_cnt u_cr_abc (.clk(clk_s), .rst_n, .inc(abc_pass), .gray(cr_str_abc));

  // --------------------------------------------------------- bi-FIFOs
  flit_t       head [NSRC];
  logic [NSRC-1:0] has, pop;

  abc_bi_fifo #(.DEPTH(DEPTH)) u_str (
    .wclk(clk_s), .rclk(clk_local), .rst_n,
    .wr_en(sf_out_valid), .wdata(sf_out_data), .wfull(str_wfull), .wempty(str_wempty),
    .rd_en(pop[S_STR]), .rdata(head[S_STR]), .rempty(str_rempty)
  );
  assign has[S_STR] = !str_rempty;

  abc_gray_cnt u_cr_str (.clk(clk_local), .rst_n, .inc(pop[S_STR]), .gray(cr_str_fifo));

  assign head[S_LOC] = loc_head;
  assign has[S_LOC]  = loc_req;
  assign loc_pop     = pop[S_LOC];

  if (IS_RED) begin : g_turn
    logic e0, e1, wf0, wf1, we0, we1;
    abc_bi_fifo #(.DEPTH(DEPTH)) u_t0 (
      .wclk(clk_t0), .rclk(clk_local), .rst_n,
      .wr_en(v_t0), .wdata(flit_t0), .wfull(wf0), .wempty(we0),
      .rd_en(pop[S_T0]), .rdata(head[S_T0]), .rempty(e0)
    );
    abc_bi_fifo #(.DEPTH(DEPTH)) u_t1 (
      .wclk(clk_t1), .rclk(clk_local), .rst_n,
      .wr_en(v_t1), .wdata(flit_t1), .wfull(wf1), .wempty(we1),
      .rd_en(pop[S_T1]), .rdata(head[S_T1]), .rempty(e1)
    );
    assign has[S_T0] = !e0;
    assign has[S_T1] = !e1;
    abc_gray_cnt u_cr_t0 (.clk(clk_local), .rst_n, .inc(pop[S_T0]), .gray(cr_t0));
    abc_gray_cnt u_cr_t1 (.clk(clk_local), .rst_n, .inc(pop[S_T1]), .gray(cr_t1));
  end else begin : g_noturn
    // a blue output has no turn inputs; these ports carry nothing
    assign head[S_T0] = flit_t0 & '0;
    assign head[S_T1] = flit_t1 & '0;
    assign has[S_T0]  = v_t0 & 1'b0;
    assign has[S_T1]  = v_t1 & 1'b0;
    assign cr_t0 = {CNT_W{clk_t0 & clk_t1 & 1'b0}};
    assign cr_t1 = '0;
  end

  // ------------------------------------------------------------ FSM
  logic any_pend, turn_pend, busy, eff_active;
  logic [1:0] eff_src;
  tgt_e eff_tgt;
  logic [3:0] fsm_state;

  assign turn_pend = has[S_T0] || has[S_T1] || has[S_LOC];
  assign any_pend  = turn_pend || has[S_STR];
  assign eff_active = f_valid(out_reg) ? !f_tail(out_reg) : pkt_active;
  assign eff_src    = f_valid(out_reg) ? out_src : pkt_src;
  assign eff_tgt    = f_valid(out_reg) ? out_tgt : pkt_tgt;
  assign busy       = f_valid(out_reg) || (pkt_active && pkt_src != 2'(S_STR));

  abc_out_fsm u_fsm (
    .clk(clk_local), .rst_n, .any_pend, .turn_pend, .busy,
    .credit_ok(credit_all_ok), .in_on_l, .in_busy_l, .in_ack_l,
    .abc_allowed(s_present),
    .loc_req(loc_req_fsm), .in_req(in_req_fsm), .rd_ok, .thrash, .abc_mode,
    .state_o(fsm_state)
  );

  abc_ccontrol u_cc (
    .clk_local, .clk_in(clk_s), .rst_n, .loc_req(loc_req_fsm), .in_req(in_req_fsm),
    .start_ok, .stop(s_stop), .loc_on, .in_on, .in_on_l, .in_busy_l, .in_ack_l,
    .clk_out
  );

  // ------------------------------------------- FIFO-mode arbitration
  logic [1:0] rr_last, pick;
  logic       pick_ok, str_prio;
  tgt_e       pick_tgt;

  function automatic tgt_e src_tgt(flit_t f, tgt_e cur);
    return f_head(f) ? code_to_tgt(f_next_code(f), DN_BLUE) : cur;
  endfunction

  always_comb begin
    logic [1:0] c;
    logic [CNT_W-1:0] a;
    c       = '0;
    pop     = '0;
    pick    = 2'(S_STR);
    pick_ok = 1'b0;
    if (eff_active) begin
      pick    = eff_src;
      pick_ok = has[eff_src];
    end else if (str_prio && has[S_STR]) begin
      pick    = 2'(S_STR);
      pick_ok = 1'b1;
    end else begin
      for (int i = NSRC; i >= 1; i--) begin
        c = rr_last + 2'(i);
        if (has[c] && f_head(head[c])) begin
          pick    = c;
          pick_ok = 1'b1;
        end
      end
    end
    pick_tgt = src_tgt(head[pick], eff_tgt);
    a = avail[pick_tgt];
    if (f_valid(out_reg) && out_tgt == pick_tgt) a = a - 1'b1;
    if (a == '0 || !rd_ok) pick_ok = 1'b0;
    pop[pick] = pick_ok;
  end

  always_ff @(posedge clk_local or negedge rst_n) begin
    if (!rst_n) begin
      out_reg  <= '0;
      out_src  <= '0;
      out_tgt  <= TGT_EJECT;
      rr_last  <= '0;
      str_prio <= 1'b0;
    end else begin
      if (fsm_state == 4'd2) str_prio <= 1'b1;
      else if (pick_ok) str_prio <= 1'b0;
      if (pick_ok) begin
        out_reg <= f_shift(head[pick]);
        out_src <= pick;
        out_tgt <= pick_tgt;
        if (f_head(head[pick])) rr_last <= pick;
      end else begin
        out_reg <= '0;
      end
    end
  end

  // --------------------------------------------------------- output mux
  always_comb begin
    if (in_on) begin
      flit_out = abc_pass ? f_shift(flit_s) : '0;
      send_tgt = s_tgt;
    end else begin
      flit_out = out_reg;
      send_tgt = out_tgt;
    end
    send = f_valid(flit_out);
  end

  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n) begin
      pkt_active <= 1'b0;
      pkt_src    <= '0;
      pkt_tgt    <= TGT_EJECT;
    end else if (send) begin
      if (f_head(flit_out)) begin
        pkt_active <= 1'b1;
        pkt_src    <= in_on ? 2'(S_STR) : out_src;
        pkt_tgt    <= send_tgt;
      end else if (f_tail(flit_out)) begin
        pkt_active <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk_s) begin
    if (rst_n) assert (!(v_s && sf_full)) else $error("straight path overflow");
  end
endmodule
