// ABC router: five-port router of the double-chain network.
//
// Ports 0..3 are the chain ports blue+, blue-, red+, red- (abc_pkg::port_e);
// the fifth is the local processing element. Every network link is
// source-synchronous: it carries its clock with the flit, and a credit-return
// bundle (abc_pkg::cred_t) travels back beside it.
//   * Four input units read the hop code of each header and steer the packet.
//   * Two blocks A (blue outputs) take the straight blue input and the local
//     input; two blocks B (red outputs) also take both blue inputs turning to
//     red. Blue never receives from red: turns go from blue to red only.
//   * Block C (eject unit) delivers packets that end here.
//   * The inject unit computes the source route and holds local packets.
// Every output block runs its own FSM and clock selection, so the blue and red
// outputs work independently and may be in different modes at once.
// Interface timing: inputs are sampled on the rising edge of their own link
// clock; outputs change after the rising edge of their own output clock
// (local clock in FIFO mode, forwarded incoming clock in ABC mode).
// The structure follows the document's router diagram; the document shares two
// of its ten bi-FIFOs between block C and the blocks B, while here every path
// has a buffer of its own (twelve bi-FIFOs).
// In ABC mode out_flit[o] is a combinational function of in_flit[o^1], so in
// a network the bypass paths of consecutive routers form long combinational
// chains. Lint tools that treat out_flit as one signal report this as a
// circular path; bit for bit there is no loop, because a chain only runs in
// one direction and never feeds back into itself.
module abc_router #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned ROWS  = 7,
  parameter int unsigned COLS  = 7
) (
  input  logic           clk_local,
  input  logic           rst_n,
  input  logic [3:0]     my_r,
  input  logic [3:0]     my_c,
  // network inputs and their credit return
  input  logic [3:0]     in_present,  // input has a link (tie off at chain ends)
  input  logic [3:0]     in_clk,
  input  abc_pkg::flit_t in_flit [4],
  output abc_pkg::cred_t in_cred [4],
  // network outputs and their credit return
  output logic [3:0]     out_clk,
  output abc_pkg::flit_t out_flit [4],
  input  abc_pkg::cred_t out_cred [4],
  // local processing element
  input  logic           inj_valid,
  input  abc_pkg::flit_t inj_flit,
  input  logic [3:0]     inj_dst_r,
  input  logic [3:0]     inj_dst_c,
  output logic           inj_ready,
  output logic           ej_valid,
  output abc_pkg::flit_t ej_flit,
  input  logic           ej_ready,
  // status
  output logic [3:0]     abc_mode,
  output logic [3:0]     abc_fwd,
  output logic [3:0]     thrash
);
  import abc_pkg::*;
  localparam int unsigned BP = 0, BM = 1, RP = 2, RM = 3;  // port indices (abc_pkg::port_e)

  logic [3:0] v_str, v_tp, v_tm, v_ej;
  tgt_e       tgt [4];
  logic [3:0] loc_req, loc_pop;
  flit_t      loc_head;
  logic [CNT_W-1:0] cr_abc [4], cr_fifo [4], cr_t0 [4], cr_t1 [4];
  logic [3:0][CNT_W-1:0] cr_ej;

  for (genvar p = 0; p < 4; p++) begin : g_in
    abc_input_unit #(.IS_BLUE(p < 2)) u_in (
      .clk_in(in_clk[p]), .rst_n, .flit_in(in_flit[p]),
      .v_str(v_str[p]), .v_turn_p(v_tp[p]), .v_turn_m(v_tm[p]), .v_eject(v_ej[p]),
      .tgt(tgt[p])
    );
  end

  abc_inject_unit #(.DEPTH(DEPTH), .ROWS(ROWS), .COLS(COLS)) u_inj (
    .clk(clk_local), .rst_n, .my_r, .my_c, .inj_valid, .inj_flit, .inj_dst_r, .inj_dst_c,
    .inj_ready, .req(loc_req), .head(loc_head), .pop(loc_pop)
  );

  // output o takes its straight flits from input o^1 (same chain, other side)
  for (genvar o = 0; o < 4; o++) begin : g_out
    localparam int unsigned S = o ^ 1;
    abc_out_unit #(.IS_RED(o >= 2), .DEPTH(DEPTH)) u_out (
      .clk_local, .rst_n,
      .clk_s(in_clk[S]), .flit_s(in_flit[S]), .v_s(v_str[S]), .s_present(in_present[S]),
      .clk_t0(in_clk[BP]), .flit_t0(in_flit[BP]),
      .v_t0((o == RP) ? v_tp[BP] : v_tm[BP]),
      .clk_t1(in_clk[BM]), .flit_t1(in_flit[BM]),
      .v_t1((o == RP) ? v_tp[BM] : v_tm[BM]),
      .loc_req(loc_req[o]), .loc_head, .loc_pop(loc_pop[o]),
      .clk_out(out_clk[o]), .flit_out(out_flit[o]), .cred_in(out_cred[o]),
      .cr_str_abc(cr_abc[S]), .cr_str_fifo(cr_fifo[S]), .cr_t0(cr_t0[o]), .cr_t1(cr_t1[o]),
      .abc_mode(abc_mode[o]), .abc_fwd(abc_fwd[o]), .thrash(thrash[o])
    );
  end

  abc_eject_unit #(.DEPTH(DEPTH)) u_ej (
    .clk_local, .rst_n, .clk_in(in_clk), .flit_in(in_flit), .v_in(v_ej),
    .ej_valid, .ej_flit, .ej_ready, .cr(cr_ej)
  );

  // credit return bundles, one per input link
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      in_cred[p]              = '0;
      in_cred[p][CR_STR_ABC]  = cr_abc[p];
      in_cred[p][CR_STR_FIFO] = cr_fifo[p];
      in_cred[p][CR_EJECT]    = cr_ej[p];
    end
    // blue inputs: turn buffers sit in the red output blocks
    in_cred[BP][CR_TURN_P] = cr_t0[RP];
    in_cred[BP][CR_TURN_M] = cr_t0[RM];
    in_cred[BM][CR_TURN_P] = cr_t1[RP];
    in_cred[BM][CR_TURN_M] = cr_t1[RM];
  end
endmodule
