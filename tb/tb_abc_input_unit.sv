// Checks the input unit of a blue and of a red port: the hop code of each
// header selects straight, turn to red+, turn to red- or eject, body and tail
// flits follow their header, exactly one strobe is active for a valid flit and
// none for an empty cycle, and a red port never turns (10 and 11 eject there).
`timescale 1ns / 1ps
module tb_abc_input_unit;
  import abc_pkg::*;
  logic clk = 0, rst_n = 1;
  flit_t fb = '0, fr = '0;
  logic bs, btp, btm, be, rs, rtp, rtm, re;
  tgt_e bt, rt;
  int checks = 0, failures = 0;

  abc_input_unit #(.IS_BLUE(1'b1)) u_b (.clk_in(clk), .rst_n, .flit_in(fb),
    .v_str(bs), .v_turn_p(btp), .v_turn_m(btm), .v_eject(be), .tgt(bt));
  abc_input_unit #(.IS_BLUE(1'b0)) u_r (.clk_in(clk), .rst_n, .flit_in(fr),
    .v_str(rs), .v_turn_p(rtp), .v_turn_m(rtm), .v_eject(re), .tgt(rt));

  always #5 clk = ~clk;

  function automatic flit_t mk(ftype_e t, logic [1:0] code);
    flit_t f;
    f = flit_t'({$urandom, $urandom, $urandom, $urandom});
    f[FLIT_W-1] = 1'b1;
    f[FLIT_W-2 -: 2] = t;
    if (t == FT_HEAD) f[ROUTE_W-1 -: 2] = code;
    return f;
  endfunction

  task automatic chk(logic [3:0] got, logic [3:0] exp, string who);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s strobes %b expected %b", who, got, exp); end
  endtask

  function automatic logic [3:0] exp_strobe(logic [1:0] code, bit blue);
    case (code)
      2'b01: return 4'b1000;
      2'b10: return blue ? 4'b0100 : 4'b0001;
      2'b11: return blue ? 4'b0010 : 4'b0001;
      default: return 4'b0001;
    endcase
  endfunction

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      logic [1:0] code;
      int len;
      code = 2'($urandom);
      len = 2 + $urandom_range(3);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        fb = mk(i == 0 ? FT_HEAD : (i == len - 1 ? FT_TAIL : FT_BODY), code);
        fr = fb;
        #1;
        chk({bs, btp, btm, be}, exp_strobe(code, 1), "blue");
        chk({rs, rtp, rtm, re}, exp_strobe(code, 0), "red");
        if ($urandom_range(3) == 0) begin
          @(negedge clk);
          fb = '0; fr = '0;
          #1;
          chk({bs, btp, btm, be}, 4'b0000, "blue idle");
          chk({rs, rtp, rtm, re}, 4'b0000, "red idle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
