// ABC network: ROWS x COLS routers in the Serpentine double-chain topology.
//
// Two chains each pass once through every node. The red chain runs along the
// rows, snaking from row to row at alternating ends; the blue chain runs along
// the columns, snaking from column to column at alternating ends (bottom row,
// column 0 is the start of both). Every router uses its four chain ports for
// the two neighbours on each chain; the ports at the two ends of a chain are
// left unconnected (no clock, no flits, no credit). The topology and the 7 x 7
// size follow the document's main configuration.
// Every node has its own clock (clk[n]) and a processing-element interface:
// inject with destination and valid/ready, eject with valid/ready. Node n is
// row n / COLS, column n % COLS. Status per node and output port: abc_mode
// (port is in ABC mode), abc_fwd (a flit took the bypass at this edge of the
// port's incoming clock) and thrash (an aborted switch to ABC mode).
// Ports in ABC mode pass flits combinationally from router to router along a
// chain. The whole out_flit array may therefore be reported as circular
// combinational logic. No real loop exists: every bypass path runs one way
// along one chain and ends at a port in FIFO mode or at a chain end.
module abc_noc #(
  parameter int unsigned ROWS  = 7,
  parameter int unsigned COLS  = 7,
  parameter int unsigned DEPTH = 8
) (
  input  logic [ROWS*COLS-1:0] clk,
  input  logic                 rst_n,
  input  logic [ROWS*COLS-1:0] inj_valid,
  input  abc_pkg::flit_t       inj_flit  [ROWS*COLS],
  input  logic [3:0]           inj_dst_r [ROWS*COLS],
  input  logic [3:0]           inj_dst_c [ROWS*COLS],
  output logic [ROWS*COLS-1:0] inj_ready,
  output logic [ROWS*COLS-1:0] ej_valid,
  output abc_pkg::flit_t       ej_flit   [ROWS*COLS],
  input  logic [ROWS*COLS-1:0] ej_ready,
  output logic [3:0]           abc_mode  [ROWS*COLS],
  output logic [3:0]           abc_fwd   [ROWS*COLS],
  output logic [3:0]           thrash    [ROWS*COLS]
);
  import abc_pkg::*;
  localparam int N = ROWS * COLS;

  function automatic int red_pos(int n);
    int r, c;
    r = n / int'(COLS);
    c = n % int'(COLS);
    return r * int'(COLS) + ((r % 2 == 0) ? c : int'(COLS) - 1 - c);
  endfunction

  function automatic int blue_pos(int n);
    int r, c;
    r = n / int'(COLS);
    c = n % int'(COLS);
    return c * int'(ROWS) + ((c % 2 == 0) ? r : int'(ROWS) - 1 - r);
  endfunction

  // neighbour of node n in direction p (0 blue+, 1 blue-, 2 red+, 3 red-), -1 if none
  function automatic int nbr(int n, int p);
    int want;
    want = (p < 2) ? blue_pos(n) : red_pos(n);
    want = want + ((p % 2 == 0) ? 1 : -1);
    if (want < 0 || want >= N) return -1;
    for (int m = 0; m < N; m++) begin
      if (p < 2 && blue_pos(m) == want) return m;
      if (p >= 2 && red_pos(m) == want) return m;
    end
    return -1;
  endfunction

  logic [3:0] oclk  [N];
  flit_t      oflit [N][4];
  cred_t      icred [N][4];
  logic [3:0] iclk  [N];
  logic [3:0] ipres [N];
  flit_t      iflit [N][4];
  cred_t      ocred [N][4];

  for (genvar n = 0; n < N; n++) begin : g_node
    for (genvar p = 0; p < 4; p++) begin : g_port
      localparam int NB = nbr(n, p);
      if (NB >= 0) begin : g_link
        // input p is fed by output p^1 of the neighbour in direction p
        assign ipres[n][p] = 1'b1;
        assign iclk[n][p]  = oclk[NB][p ^ 1];
        assign iflit[n][p] = oflit[NB][p ^ 1];
        assign ocred[n][p] = icred[NB][p ^ 1];
      end else begin : g_end
        assign ipres[n][p] = 1'b0;
        assign iclk[n][p]  = 1'b0;
        assign iflit[n][p] = '0;
        assign ocred[n][p] = '0;
      end
    end

    abc_router #(.DEPTH(DEPTH), .ROWS(ROWS), .COLS(COLS)) u_router (
      .clk_local(clk[n]), .rst_n,
      .my_r(4'(n / COLS)), .my_c(4'(n % COLS)),
      .in_present(ipres[n]), .in_clk(iclk[n]), .in_flit(iflit[n]), .in_cred(icred[n]),
      .out_clk(oclk[n]), .out_flit(oflit[n]), .out_cred(ocred[n]),
      .inj_valid(inj_valid[n]), .inj_flit(inj_flit[n]),
      .inj_dst_r(inj_dst_r[n]), .inj_dst_c(inj_dst_c[n]), .inj_ready(inj_ready[n]),
      .ej_valid(ej_valid[n]), .ej_flit(ej_flit[n]), .ej_ready(ej_ready[n]),
      .abc_mode(abc_mode[n]), .abc_fwd(abc_fwd[n]), .thrash(thrash[n])
    );
  end
endmodule
