// Checks source route generation on the 7 x 7 Serpentine topology for every
// source/destination pair. The testbench builds both chains by walking the
// snake patterns itself, then follows each generated route hop by hop as the
// routers would (first code at the source, then straight/turn codes, 00 at the
// end) and checks that it ends exactly at the destination, turns at most once
// and only from blue to red, and costs no more (hops + 4 per turn) than the
// best of the three legal paths, and that ties go to the turn path first and
// to blue before red (also reported on the path output). It also checks the worked example of the
// routing description bit for bit: from (0,4) to (1,1) the codes are
// 11 10 01 01 00 (blue+, turn to red+, straight, straight, destination).
`timescale 1ns / 1ps
module tb_abc_route_gen;
  import abc_pkg::*;
  localparam int R = 7, C = 7, N = R * C;
  logic [3:0] src_r, src_c, dst_r, dst_c;
  logic [ROUTE_W-1:0] route;
  logic [1:0] path;
  int checks = 0, failures = 0;
  int red_seq [N], blue_seq [N], red_at [N], blue_at [N];

  abc_route_gen #(.ROWS(R), .COLS(C)) dut (.*);

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    int k;
    // red chain: row 0 from column 0 upward in c, then back in row 1, ...
    k = 0;
    for (int r = 0; r < R; r++)
      for (int j = 0; j < C; j++) begin
        int c;
        c = (r % 2 == 0) ? j : C - 1 - j;
        red_seq[k] = r * C + c; red_at[r * C + c] = k; k++;
      end
    k = 0;
    for (int c = 0; c < C; c++)
      for (int j = 0; j < R; j++) begin
        int r;
        r = (c % 2 == 0) ? j : R - 1 - j;
        blue_seq[k] = r * C + c; blue_at[r * C + c] = k; k++;
      end

    // worked example
    src_r = 0; src_c = 4; dst_r = 1; dst_c = 1;
    #1;
    checks++;
    if (route[ROUTE_W-1 -: 10] != 10'b11_10_01_01_00 || route[ROUTE_W-11:0] != '0) begin
      failures++;
      $display("FAIL example route %b", route[ROUTE_W-1 -: 12]);
    end

    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        int node, hops, turns, chain, dir, pos, best, hb, hr, ht, first, want;
        logic [1:0] code;
        bit ok;
        if (s == d) continue;
        src_r = 4'(s / C); src_c = 4'(s % C); dst_r = 4'(d / C); dst_c = 4'(d % C);
        #1;
        node = s; hops = 0; turns = 0; ok = 1;
        code = route[ROUTE_W-1 -: 2];
        case (code)  // local input codes
          2'b11: begin chain = 0; dir = 1; end
          2'b01: begin chain = 0; dir = -1; end
          2'b10: begin chain = 1; dir = 1; end
          default: begin chain = 1; dir = -1; end
        endcase
        first = chain;
        for (int h = 1; h < 62; h++) begin
          pos = (chain == 0 ? blue_at[node] : red_at[node]) + dir;
          if (pos < 0 || pos >= N) begin ok = 0; break; end
          node = (chain == 0) ? blue_seq[pos] : red_seq[pos];
          hops++;
          code = route[ROUTE_W-1-2*h -: 2];
          if (code == 2'b00) break;
          if (code == 2'b10 || code == 2'b11) begin
            if (chain == 1) begin ok = 0; break; end
            chain = 1; dir = (code == 2'b10) ? 1 : -1; turns++;
          end
        end
        hb = iabs(blue_at[d] - blue_at[s]);
        hr = iabs(red_at[d] - red_at[s]);
        ht = iabs(d / C - s / C) + iabs(d % C - s % C) + 4;
        best = hb < hr ? hb : hr;
        if (s / C != d / C && s % C != d % C && ht < best) best = ht;
        checks++;
        if (!ok || node != d || turns > 1 || hops + 4 * turns > best) begin
          failures++;
          if (failures < 10) $display("FAIL %0d -> %0d: end %0d hops %0d turns %0d best %0d", s, d, node, hops, turns, best);
        end
        // tie-break: a turn wins ties, then blue over red
        if (s / C != d / C && s % C != d % C && ht <= hb && ht <= hr) want = 2;
        else want = (hb <= hr) ? 0 : 1;
        checks++;
        if ((turns > 0 ? 2 : first) != want || int'(path) != want) begin
          failures++;
          if (failures < 10) $display("FAIL %0d -> %0d: path %0d/%0d, expected %0d", s, d, turns > 0 ? 2 : first, path, want);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
