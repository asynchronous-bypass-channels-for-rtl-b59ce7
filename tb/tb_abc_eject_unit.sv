// Checks block C, the ejection unit: four senders with clocks of the same
// period and different phases push packets into the four ejection buffers,
// each respecting the credits the unit returns. The processing element side
// is ready only part of the time. Every packet must arrive whole, unmixed
// with others, in order per sender, and the credits returned must equal the
// flits read; all four senders must be served.
`timescale 1ns / 1ps
module tb_abc_eject_unit;
  import abc_pkg::*;
  logic clk_local = 0, rst_n = 1;
  logic [3:0] clk_in = '0, v_in = '0;
  flit_t flit_in [4];
  logic ej_valid, ej_ready = 0;
  flit_t ej_flit;
  logic [3:0][CNT_W-1:0] cr;
  int checks = 0, failures = 0;
  int sent [4], got_pkts [4], exp_seq [4];
  int cur_src = -1, cur_idx = 0, total_got = 0;
  localparam int PKTS = 40;

  abc_eject_unit #(.DEPTH(8)) dut (.*);

  always #5 clk_local = ~clk_local;
  for (genvar i = 0; i < 4; i++) begin : g_src
    int seq = 0, idx = 0, len = 0, outst = 0;
    initial begin #(1.7 * i + 0.5); forever #5 clk_in[i] = ~clk_in[i]; end
    always @(posedge clk_in[i]) begin
      if (!rst_n) begin
        v_in[i] <= 0;
      end else begin
        if (v_in[i]) sent[i]++;
        outst = int'(CNT_W'(CNT_W'(sent[i]) - gray2bin(cr[i])));
        if (seq < PKTS && outst + (v_in[i] ? 1 : 0) < 8 - 1 && $urandom_range(99) < 50) begin
          flit_t f;
          if (idx == 0) len = 2 + $urandom_range(3);
          f = '0;
          f[FLIT_W-1] = 1;
          f[FLIT_W-2 -: 2] = (idx == 0) ? FT_HEAD : (idx == len - 1) ? FT_TAIL : FT_BODY;
          f[31:24] = 8'(i); f[23:8] = 16'(seq); f[7:0] = 8'(idx);
          flit_in[i] <= f;
          v_in[i] <= 1;
          idx++;
          if (idx == len) begin idx = 0; seq++; end
        end else begin
          v_in[i] <= 0;
        end
      end
    end
  end

  always @(posedge clk_local) begin
    ej_ready <= $urandom_range(99) < 70;
    if (rst_n && ej_valid && ej_ready) begin
      int s;
      total_got++;
      s = int'(ej_flit[31:24]);
      checks++;
      if (f_head(ej_flit)) begin
        if (cur_src != -1) begin failures++; $display("FAIL header inside packet"); end
        cur_src = s; cur_idx = 0;
        if (int'(ej_flit[23:8]) != exp_seq[s]) begin failures++; $display("FAIL src %0d seq %0d expected %0d", s, ej_flit[23:8], exp_seq[s]); end
      end else if (s != cur_src || int'(ej_flit[7:0]) != cur_idx) begin
        failures++; $display("FAIL mixed or reordered flit from %0d", s);
      end
      cur_idx++;
      if (f_tail(ej_flit)) begin cur_src = -1; exp_seq[s]++; got_pkts[s]++; end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) begin sent[i] = 0; got_pkts[i] = 0; exp_seq[i] = 0; end
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (got_pkts[0] == PKTS && got_pkts[1] == PKTS && got_pkts[2] == PKTS && got_pkts[3] == PKTS);
    repeat (10) @(posedge clk_local);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (gray2bin(cr[i]) != CNT_W'(sent[i])) begin failures++; $display("FAIL credits %0d of %0d", gray2bin(cr[i]), sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("FAIL watchdog, packets %0d %0d %0d %0d", got_pkts[0], got_pkts[1], got_pkts[2], got_pkts[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
