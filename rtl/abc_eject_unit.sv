// Output block C: delivery to the local processing element.
//
// One bi-FIFO per network input (blue+, blue-, red+, red-) takes the flits
// that end their trip at this router, written in that input's incoming clock.
// In the local clock the block reads them one packet at a time, in round
// robin between the four buffers, and hands them to the processing element
// with a valid/ready handshake. Every read returns a credit to the upstream
// router that sent the flit (gray-coded running count cr[i]).
// A packet keeps the port from header to tail. The document gives the four
// buffers and the multiplexer; the packet lock, the handshake and the credit
// return for ejection are this design's choices.
module abc_eject_unit #(
  parameter int unsigned DEPTH = 8
) (
  input  logic                clk_local,
  input  logic                rst_n,
  input  logic [3:0]          clk_in,
  input  abc_pkg::flit_t      flit_in [4],
  input  logic [3:0]          v_in,
  output logic                ej_valid,
  output abc_pkg::flit_t      ej_flit,
  input  logic                ej_ready,
  output logic [3:0][abc_pkg::CNT_W-1:0] cr
);
  import abc_pkg::*;

  flit_t      head [4];
  logic [3:0] empty, pop;
  logic [1:0] rr_last, lock_src, pick;
  logic       locked, pick_ok;

  for (genvar i = 0; i < 4; i++) begin : g_in
    logic wf, we;
    abc_bi_fifo #(.DEPTH(DEPTH)) u_fifo (
      .wclk(clk_in[i]), .rclk(clk_local), .rst_n,
      .wr_en(v_in[i]), .wdata(flit_in[i]), .wfull(wf), .wempty(we),
      .rd_en(pop[i]), .rdata(head[i]), .rempty(empty[i])
    );
    abc_gray_cnt u_cr (.clk(clk_local), .rst_n, .inc(pop[i]), .gray(cr[i]));
  end

  always_comb begin
    logic [1:0] c;
    c       = '0;
    pick    = lock_src;
    pick_ok = 1'b0;
    if (locked) begin
      pick_ok = !empty[lock_src];
    end else begin
      for (int i = 4; i >= 1; i--) begin
        c = rr_last + 2'(i);
        if (!empty[c]) begin
          pick    = c;
          pick_ok = 1'b1;
        end
      end
    end
    ej_valid = pick_ok;
    ej_flit  = head[pick];
    pop      = '0;
    pop[pick] = pick_ok && ej_ready;
  end

  always_ff @(posedge clk_local or negedge rst_n) begin
    if (!rst_n) begin
      rr_last  <= '0;
      lock_src <= '0;
      locked   <= 1'b0;
    end else if (pick_ok && ej_ready) begin
      if (f_head(ej_flit)) begin
        rr_last  <= pick;
        lock_src <= pick;
        locked   <= 1'b1;
      end
      if (f_tail(ej_flit)) locked <= 1'b0;
    end
  end
endmodule
