// Straight-path sync-FIFO.
//
// Sits at the straight input of an output block, clocked by the incoming clock.
// Every straight flit is latched here at the edge it arrives, at the same time
// as it is offered to the asynchronous bypass channel (ABC). The flit is tagged
// with whether the bypass actually carried it (fwd). A tagged flit is flushed
// (dropped) when it reaches the head; an untagged one is handed to the
// straight-path bi-FIFO as soon as that has room. So the sync-FIFO is the
// backup copy of every flit the bypass could not take, and no flit is lost
// while the output port changes mode.
// Interface: push/din/fwd on the incoming clock; out_valid/out_data/out_ready
// towards the bi-FIFO (same clock). One entry moves per edge.
// The flush-by-tag mechanism and the depth of four are this design's choices;
// the document gives only the function and the flush enable.
module abc_sync_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = abc_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         fwd,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic         tag [DEPTH];
  logic [AW:0]  wp, rp;
  logic         pop;

  assign empty     = (wp == rp);
  assign full      = (wp == {~rp[AW], rp[AW-1:0]});
  assign out_valid = !empty && !tag[rp[AW-1:0]];
  assign out_data  = mem[rp[AW-1:0]];
  // flush a forwarded flit, or move a kept one into the bi-FIFO
  assign pop       = !empty && (tag[rp[AW-1:0]] || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) begin
      mem[wp[AW-1:0]] <= din;
      tag[wp[AW-1:0]] <= fwd;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(push && full)) else $error("sync-FIFO overflow");
  end
endmodule
