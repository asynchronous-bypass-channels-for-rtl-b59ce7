// Input unit of one network port (blue+, blue-, red+ or red-).
//
// Reads the 2-bit hop code of an arriving header flit and steers the whole
// packet (wormhole) to one of the router's buffers: the straight path of the
// opposite output of the same chain, a turn bi-FIFO of a red output (blue
// inputs only, since turns go from blue to red only), or the ejection bi-FIFO
// of the local port. Body and tail flits follow the target their header chose,
// which is held in a register clocked by the incoming clock.
// Interface: flit_in with its incoming clock; one valid strobe per target,
// combinational, for the flit present on flit_in in this cycle; flit_out is
// flit_in unchanged. Decoding takes no clock cycle, as the document asks of
// the source routing ("retrieve the next hop information ... without impacting
// the skew").
module abc_input_unit #(
  parameter bit IS_BLUE = 1'b1
) (
  input  logic             clk_in,
  input  logic             rst_n,
  input  abc_pkg::flit_t   flit_in,
  output logic             v_str,
  output logic             v_turn_p,
  output logic             v_turn_m,
  output logic             v_eject,
  output abc_pkg::tgt_e    tgt
);
  import abc_pkg::*;

  tgt_e cur;

  assign tgt = f_head(flit_in) ? code_to_tgt(f_code(flit_in), IS_BLUE) : cur;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n)                 cur <= TGT_EJECT;
    else if (f_head(flit_in))   cur <= tgt;
  end

  always_comb begin
    v_str    = f_valid(flit_in) && (tgt == TGT_STRAIGHT);
    v_turn_p = f_valid(flit_in) && (tgt == TGT_TURN_P);
    v_turn_m = f_valid(flit_in) && (tgt == TGT_TURN_M);
    v_eject  = f_valid(flit_in) && (tgt == TGT_EJECT);
  end
endmodule
