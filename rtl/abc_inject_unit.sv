// Local injection unit: the router's local input.
//
// The processing element hands in flits with a valid/ready handshake. For a
// header flit it also gives the destination node; the unit computes the
// source route (abc_route_gen) and writes it into the header's route field.
// Flits are stored in the local sync-FIFO (local clock, DEPTH entries). The
// head packet is offered to the one network output its first hop code names
// (11 blue+, 01 blue-, 10 red+, 00 red-); that output pops flits with pop[p]
// when it sends them. The target is held from header to tail.
// The document shares one local sync-FIFO among all output blocks; computing
// the route at injection follows its source routing. The valid/ready handshake
// and the FIFO depth are this design's choices.
module abc_inject_unit #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ROWS  = 7,
  parameter int unsigned COLS  = 7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [3:0]     my_r,
  input  logic [3:0]     my_c,
  input  logic           inj_valid,
  input  abc_pkg::flit_t inj_flit,
  input  logic [3:0]     inj_dst_r,
  input  logic [3:0]     inj_dst_c,
  output logic           inj_ready,
  output logic [3:0]     req,      // per output port blue+, blue-, red+, red-
  output abc_pkg::flit_t head,
  input  logic [3:0]     pop
);
  import abc_pkg::*;
  localparam int unsigned AW = $clog2(DEPTH);

  flit_t                 mem [DEPTH];
  logic [AW:0]           wp, rp;
  logic                  empty, full, do_pop;
  logic [ROUTE_W-1:0]    route;
  logic [1:0]            path;
  flit_t                 wdata;
  logic [1:0]            port, cur;

  abc_route_gen #(.ROWS(ROWS), .COLS(COLS)) u_route (
    .src_r(my_r), .src_c(my_c), .dst_r(inj_dst_r), .dst_c(inj_dst_c),
    .route, .path
  );

  always_comb begin
    wdata = inj_flit;
    wdata[FLIT_W-1] = 1'b1;
    if (f_head(inj_flit)) wdata[ROUTE_W-1:0] = route;
  end

  assign empty     = (wp == rp);
  assign full      = (wp == {~rp[AW], rp[AW-1:0]});
  assign inj_ready = !full;
  assign head      = mem[rp[AW-1:0]];
  assign do_pop    = |pop && !empty;

  // port index: 0 blue+, 1 blue-, 2 red+, 3 red-
  always_comb begin
    if (f_head(head)) begin
      case (f_code(head))
        2'b11:   port = 2'd0;
        2'b01:   port = 2'd1;
        2'b10:   port = 2'd2;
        default: port = 2'd3;
      endcase
    end else begin
      port = cur;
    end
    req = '0;
    if (!empty) req[port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cur <= '0;
    end else begin
      if (inj_valid && !full) wp <= wp + 1'b1;
      if (do_pop) begin
        rp <= rp + 1'b1;
        if (f_head(head)) cur <= port;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (inj_valid && !full) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(|pop && !(|(pop & req)))) else $error("local pop without request");
  end
endmodule
