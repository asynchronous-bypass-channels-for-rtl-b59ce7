// Ccontrol: output clock selection of one output port.
//
// The output clock of an ABC output port is either the router's local clock
// (FIFO mode), the clock arriving with the straight input (ABC mode), or held
// high while the port changes mode, so that the downstream router never sees
// two rising edges closer than a clock period.
//
// Each source has its own enable flip-flop, clocked by that source, so an
// enable only changes right after the source's rising edge, while the clock is
// high: switching a source on or off never makes an edge. The output is
//   clk_out = (loc_on & clk_local) | (in_on & clk_in) | (~loc_on & ~in_on).
//
// loc_on follows loc_req (from the control FSM, local domain) at the next
// local edge. The incoming enable in_on is a three-state machine on the
// incoming clock (OFF, ON, DONE): the request in_req from the FSM arrives
// through a two flip-flop synchronizer; ON is entered only when start_ok
// (no straight flit buffered, downstream credit available) holds, and left as
// soon as the request drops or a straight flit finds no credit (stop). DONE
// waits for the request to drop, so the FSM sees every exit from ABC mode. in_on
// also selects the bypass as data source, and goes back to the FSM as in_on_l
// (synchronized) as the trigger for leaving ABC mode. in_busy_l tells the FSM
// that the incoming side still sees the request or is open, in_ack_l that it
// has seen the request. The FSM holds a request until it is acknowledged and
// enables the local clock only once in_busy_l has fallen (a four-phase
// handshake), so a short request can never open the incoming gate after the
// local clock is back on.
// The per-source enable flip-flops and the OFF/ON/DONE handshake are this
// design's choices; the document gives the three clock choices and the
// two-stage synchronization of the trigger.
module abc_ccontrol (
  input  logic clk_local,
  input  logic clk_in,
  input  logic rst_n,
  input  logic loc_req,   // local domain
  input  logic in_req,    // local domain
  input  logic start_ok,  // incoming domain
  input  logic stop,      // incoming domain
  output logic loc_on,
  output logic in_on,     // incoming domain
  output logic in_on_l,   // in_on synchronized to the local clock
  output logic in_busy_l, // request seen or gate open, synchronized to the local clock
  output logic in_ack_l,  // request as seen by the incoming side, synchronized back
  output logic clk_out
);
  typedef enum logic [1:0] {G_OFF, G_ON, G_DONE} gate_e;

  gate_e gst;
  logic  in_req_s;

  always_ff @(posedge clk_local or negedge rst_n) begin
    if (!rst_n) loc_on <= 1'b1;
    else        loc_on <= loc_req;
  end

  abc_sync2 u_req (.clk(clk_in), .rst_n, .d(in_req), .q(in_req_s));

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      gst <= G_OFF;
    end else begin
      case (gst)
        G_OFF:   if (in_req_s && start_ok) gst <= G_ON;
        G_ON:    if (!in_req_s || stop) gst <= G_DONE;
        default: if (!in_req_s) gst <= G_OFF;
      endcase
    end
  end

  assign in_on = (gst == G_ON);

  abc_sync2 u_on (.clk(clk_local), .rst_n, .d(in_on), .q(in_on_l));
  abc_sync2 u_busy (.clk(clk_local), .rst_n, .d(in_on | in_req_s), .q(in_busy_l));
  abc_sync2 u_ack (.clk(clk_local), .rst_n, .d(in_req_s), .q(in_ack_l));

  assign clk_out = (loc_on & clk_local) | (in_on & clk_in) | (~loc_on & ~in_on);

  always @(posedge clk_local) begin
    if (rst_n) assert (!(loc_on && in_on)) else $error("both output clocks enabled");
  end
endmodule
