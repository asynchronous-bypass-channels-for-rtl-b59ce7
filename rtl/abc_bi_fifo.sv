// Bi-synchronous FIFO (bi-FIFO).
//
// Buffers flits written in one clock domain (the incoming, upstream clock) and
// read in another (the router's local clock). Read and write pointers are kept
// in gray code and each is passed to the other side through a two flip-flop
// synchronizer, so a written flit becomes visible to the reader two to three
// read-clock edges later, the overhead the document gives for its bi-FIFOs.
// The read side is first-word-fall-through: rdata shows the oldest flit while
// rempty is low, and rd_en pops it at the next rclk edge.
// The write side also reports wempty, a conservative "nothing is stored" that
// is never true while a flit is still inside.
// Depth follows the document (eight flits); it must be a power of two.
module abc_bi_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = abc_pkg::FLIT_W
) (
  input  logic         wclk,
  input  logic         rclk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  output logic         wempty,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray, wgray_r, rgray_w;

  // write side
  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0;
    end else if (wr_en && !wfull) begin
      wbin <= wbin + 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  assign wgray = wbin ^ (wbin >> 1);

  abc_sync2 #(.W(AW + 1)) u_r2w (.clk(wclk), .rst_n, .d(rgray), .q(rgray_w));

  assign wfull  = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});
  assign wempty = (wgray == rgray_w);

  // read side
  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0;
    end else if (rd_en && !rempty) begin
      rbin <= rbin + 1'b1;
    end
  end

  assign rgray = rbin ^ (rbin >> 1);

  abc_sync2 #(.W(AW + 1)) u_w2r (.clk(rclk), .rst_n, .d(wgray), .q(wgray_r));

  assign rempty = (rgray == wgray_r);
  assign rdata  = mem[rbin[AW-1:0]];


  always_ff @(posedge wclk) begin
    if (rst_n) assert (!(wr_en && wfull)) else $error("bi-FIFO overflow");
  end

endmodule
