// Credit counters of one output port.
//
// Keeps, for every buffer a flit can land in at the downstream router
// (straight bi-FIFO, the two turn bi-FIFOs, the ejection bi-FIFO), how many
// free slots are left. The counters run on the port's output clock, which is
// the local clock in FIFO mode and the incoming clock in ABC mode, so a flit
// leaving on the bypass is counted in the clock it actually leaves with and
// no buffer has to be held in reserve.
// Returned credits arrive as gray-coded running counts (cred_in, one per kind
// of downstream event) and pass a two flip-flop synchronizer on the output
// clock. The straight buffer has two return counts, one for flits the
// downstream router forwarded on its bypass (returned immediately, in its
// incoming clock) and one for flits read from its straight bi-FIFO (returned
// in its local clock).
// avail[t] = DEPTH - (sent[t] - returned[t]); send/send_tgt count a flit the
// downstream router captures at this output clock edge.
// The document keeps three counters on a blue port and one on a red port and
// returns credits on a single wire; the separate gray counts and the extra
// counter for the ejection buffer are this design's choices.
module abc_credit_ctrl #(
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,      // output clock of the port
  input  logic              rst_n,
  input  abc_pkg::cred_t    cred_in,  // from downstream, gray counts
  input  logic              send,
  input  abc_pkg::tgt_e     send_tgt,
  output logic [abc_pkg::N_TGT-1:0][abc_pkg::CNT_W-1:0] avail
);
  import abc_pkg::*;

  cred_t             cred_s;
  logic [CNT_W-1:0]  sent [N_TGT];
  logic [CNT_W-1:0]  ret  [N_TGT];

  abc_sync2 #(.W(N_CRED * CNT_W)) u_sync (.clk, .rst_n, .d(cred_in), .q(cred_s));

  always_comb begin
    ret[TGT_STRAIGHT] = gray2bin(cred_s[CR_STR_ABC]) + gray2bin(cred_s[CR_STR_FIFO]);
    ret[TGT_TURN_P]   = gray2bin(cred_s[CR_TURN_P]);
    ret[TGT_TURN_M]   = gray2bin(cred_s[CR_TURN_M]);
    ret[TGT_EJECT]    = gray2bin(cred_s[CR_EJECT]);
    for (int t = 0; t < N_TGT; t++) avail[t] = CNT_W'(DEPTH) - (sent[t] - ret[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N_TGT; t++) sent[t] <= '0;
    end else if (send) begin
      sent[send_tgt] <= sent[send_tgt] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && send) assert (avail[send_tgt] != '0) else $error("flit sent without credit");
  end
endmodule
