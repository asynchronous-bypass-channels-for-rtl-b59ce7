// Control FSM of one ABC output port (Dcontrol), local clock domain.
//
// Moore machine with the two stable modes of the port, FIFO and ABC, and the
// transient states 1 to 9 of the document's state diagram:
//   FIFO -> 3 (bi-FIFO reads off) -> 4 (straight path selected) ->
//   5, 6 (output clock held) -> 7, 8 (incoming clock requested) ->
//   9 (bypass datapath) -> ABC
//   ABC -> 1 (output clock held) -> 2 (datapath back to the bi-FIFOs) -> FIFO
// FIFO is left only when no flit waits in any buffer of the port, no packet
// is half sent, and downstream credit is available. In states 3 and 4 a
// waiting flit or missing credit returns the FSM to FIFO in one cycle; from
// states 5 to 9 it returns through states 1 and 2. ABC is left when a turn or
// local packet waits (turn_pend) or when the incoming-side clock gate has
// closed (in_on_l low: the bypass met missing credit or found a straight flit
// it could not take).
// Every transient state lasts one local cycle, except two waits this design
// adds for a clean clock hand-over. The incoming-clock request (raised on
// entering state 7) is withdrawn in state 1 only after the incoming side has
// acknowledged it, and state 1 is held until the incoming side reports the
// request gone and its gate closed; state 8 is held until the gate reports
// open. A port whose straight input has no link (end of a chain) stays in
// FIFO mode (abc_allowed low).
// Outputs: loc_req (next state uses the local clock), in_req (incoming clock
// requested), rd_ok (bi-FIFO reads allowed), thrash (one-cycle pulse when a
// transition that had reached state 5 is aborted before ABC), abc_mode.
module abc_out_fsm (
  input  logic clk,
  input  logic rst_n,
  input  logic any_pend,    // a flit waits in a bi-FIFO of this port or at the local input
  input  logic turn_pend,   // a flit waits in a turn bi-FIFO or at the local input
  input  logic busy,        // a packet from a buffer is half sent
  input  logic credit_ok,   // downstream credit available
  input  logic in_on_l,     // incoming clock gate open (synchronized)
  input  logic in_busy_l,   // incoming side still requested or open (synchronized)
  input  logic in_ack_l,    // incoming side has seen the request (synchronized)
  input  logic abc_allowed, // the straight input has a link (and so a clock)
  output logic loc_req,
  output logic in_req,
  output logic rd_ok,
  output logic thrash,
  output logic abc_mode,
  output logic [3:0] state_o
);
  typedef enum logic [3:0] {
    ST_FIFO = 4'd0, ST_1 = 4'd1, ST_2 = 4'd2, ST_3 = 4'd3, ST_4 = 4'd4,
    ST_5 = 4'd5, ST_6 = 4'd6, ST_7 = 4'd7, ST_8 = 4'd8, ST_9 = 4'd9,
    ST_ABC = 4'd10
  } st_e;

  st_e  st, nxt;
  logic req_q;
  logic abort_early, abort_late;

  assign abort_early = any_pend || !credit_ok;
  assign abort_late  = any_pend;

  always_comb begin
    nxt = st;
    case (st)
      ST_FIFO: if (abc_allowed && !any_pend && !busy && credit_ok) nxt = ST_3;
      ST_3:    nxt = abort_early ? ST_FIFO : ST_4;
      ST_4:    nxt = abort_early ? ST_FIFO : ST_5;
      ST_5:    nxt = abort_early ? ST_1 : ST_6;
      ST_6:    nxt = abort_early ? ST_1 : ST_7;
      ST_7:    nxt = abort_late  ? ST_1 : ST_8;
      ST_8:    nxt = abort_late  ? ST_1 : (in_on_l ? ST_9 : ST_8);
      ST_9:    nxt = abort_late  ? ST_1 : ST_ABC;
      ST_ABC:  if (turn_pend || !in_on_l) nxt = ST_1;
      ST_1:    if (!req_q && !in_busy_l) nxt = ST_2;
      ST_2:    nxt = ST_FIFO;
      default: nxt = ST_FIFO;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= ST_FIFO;
      req_q <= 1'b0;
    end else begin
      st <= nxt;
      if (nxt == ST_7 && st == ST_6) req_q <= 1'b1;
      else if (st == ST_1 && in_ack_l) req_q <= 1'b0;
    end
  end

  assign loc_req  = (nxt == ST_FIFO) || (nxt == ST_3) || (nxt == ST_4);
  assign in_req   = req_q;
  assign rd_ok    = (st == ST_FIFO);
  assign abc_mode = (st == ST_ABC);
  assign thrash   = (nxt == ST_1) && (st inside {ST_5, ST_6, ST_7, ST_8, ST_9});
  assign state_o  = st;
endmodule
