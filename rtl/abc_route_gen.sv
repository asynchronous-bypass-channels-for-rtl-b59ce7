// Source route generation for the Serpentine double-chain topology.
//
// Nodes sit on a ROWS x COLS grid; node (r, c) is row r (0 at the bottom) and
// column c. The red chain runs along the rows and snakes between them: its
// position is r*COLS + (r even ? c : COLS-1-c). The blue chain runs along the
// columns and snakes between them: c*ROWS + (c even ? r : ROWS-1-r). "+" is
// the direction of increasing position on a chain.
// Between any two nodes there are three deadlock-free paths: straight along
// blue, straight along red, or along blue within the source column to the
// destination row and then one turn onto red within that row. Their no-load
// costs, in link delays, are the blue hop count, the red hop count, and the
// two hop counts plus TURN_EXTRA (a turn costs three cycles on top of a link
// of 0.75 cycle: 3/0.75 = 4 link delays). The cheapest path is taken; on a tie
// the turn path wins over a straight one, then blue over red. The
// hop-code encoding is the one in abc_pkg.
// Output: the 125-bit route field of the header flit, first code at the top,
// then one code per hop, then the destination code 00 and zero fill.
// Purely combinational. The cost rule follows the document; the tie-break is
// this design's choice, picked so that the document's worked example
// ((0,4) to (1,1) turns at (1,4)) comes out as printed.
module abc_route_gen #(
  parameter int unsigned ROWS       = 7,
  parameter int unsigned COLS       = 7,
  parameter int unsigned TURN_EXTRA = 4
) (
  input  logic [3:0] src_r,
  input  logic [3:0] src_c,
  input  logic [3:0] dst_r,
  input  logic [3:0] dst_c,
  output logic [abc_pkg::ROUTE_W-1:0] route,
  output logic [1:0] path   // 0 blue straight, 1 red straight, 2 blue then red
);
  import abc_pkg::*;

  function automatic int pos_red(int r, int c);
    return r * int'(COLS) + ((r % 2 == 0) ? c : int'(COLS) - 1 - c);
  endfunction

  function automatic int pos_blue(int r, int c);
    return c * int'(ROWS) + ((c % 2 == 0) ? r : int'(ROWS) - 1 - r);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    int pb_s, pb_d, pr_s, pr_d, hb, hr, hv, hh, ct, pb_t, pr_t;
    int nh;
    int k;
    logic [1:0] first;
    pb_s = pos_blue(int'(src_r), int'(src_c));
    pb_d = pos_blue(int'(dst_r), int'(dst_c));
    pr_s = pos_red(int'(src_r), int'(src_c));
    pr_d = pos_red(int'(dst_r), int'(dst_c));
    hb   = iabs(pb_d - pb_s);
    hr   = iabs(pr_d - pr_s);
    hv   = iabs(int'(dst_r) - int'(src_r));
    hh   = iabs(int'(dst_c) - int'(src_c));
    ct   = hv + hh + int'(TURN_EXTRA);
    pb_t = pos_blue(int'(dst_r), int'(src_c));
    pr_t = pos_red(int'(dst_r), int'(src_c));
    route = '0;
    if (hv != 0 && hh != 0 && ct <= hb && ct <= hr) begin
      path  = 2'd2;
      first = (pb_t > pb_s) ? 2'b11 : 2'b01;
      nh    = hv + hh;
    end else if (hb <= hr) begin
      path  = 2'd0;
      first = (pb_d > pb_s) ? 2'b11 : 2'b01;
      nh    = hb;
    end else begin
      path  = 2'd1;
      first = (pr_d > pr_s) ? 2'b10 : 2'b00;
      nh    = hr;
    end
    route[ROUTE_W-1 -: 2] = first;
    // codes read by the routers after the source: hop k arrives at router k
    for (k = 1; k < int'(ROUTE_W / 2); k++) begin
      if (k < nh) begin
        if (path == 2'd2 && k == hv)
          route[ROUTE_W-1-2*k -: 2] = (pr_d > pr_t) ? C_TURN_P : C_TURN_M;
        else
          route[ROUTE_W-1-2*k -: 2] = C_STRAIGHT;
      end
    end
  end
endmodule
