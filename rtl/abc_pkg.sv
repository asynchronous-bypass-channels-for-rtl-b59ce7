// Shared types and constants of the asynchronous-bypass-channel (ABC) network.
//
// Flit format (128 bits): bit 127 is the valid bit, bits 126:125 the flit type,
// bits 124:0 the payload. In a header flit the payload is the source route: a
// list of 2-bit hop codes, most significant first. The code at bits 124:123 is
// the one the current router acts on; every output shifts a header's route left
// by two bits so the next router finds its code in the same place. A code of 00
// read from a network input means "this is the destination".
//
// Hop codes are relative to the input the header arrives on (this encoding is
// a design choice; only the example 11 = "start on blue+" at the source,
// 10 = "turn to red+" on a blue input, 01 = "straight" and 00 = "destination"
// are fixed by the document's example):
//   local input : 11 blue+, 01 blue-, 10 red+, 00 red-
//   blue input  : 01 straight, 10 turn to red+, 11 turn to red-, 00 eject
//   red input   : 01 straight, 00 eject (red never turns back to blue)
//
// Credit return: every link carries, upstream, five gray-coded running counts
// of freed buffer slots (see cred_idx_e). Counting in gray code makes the
// return safe across clock domains and across periods when a clock is held.
package abc_pkg;

  localparam int unsigned FLIT_W   = 128;  // flit width
  localparam int unsigned ROUTE_W  = FLIT_W - 3;
  localparam int unsigned CNT_W    = 5;    // width of credit running counts
  localparam int unsigned N_CRED   = 5;    // credit counts per link
  localparam int unsigned N_TGT    = 4;    // buffers a flit can land in downstream

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [N_CRED-1:0][CNT_W-1:0] cred_t;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_TAIL = 2'b01,
    FT_HEAD = 2'b10
  } ftype_e;

  // Downstream buffer a flit lands in, seen from the downstream input port.
  typedef enum logic [1:0] {
    TGT_STRAIGHT = 2'd0,
    TGT_TURN_P   = 2'd1,
    TGT_TURN_M   = 2'd2,
    TGT_EJECT    = 2'd3
  } tgt_e;

  // Index of the credit counts on a link.
  typedef enum int unsigned {
    CR_STR_ABC  = 0,  // straight flits forwarded on the bypass (incoming clock)
    CR_STR_FIFO = 1,  // straight bi-FIFO reads (local clock)
    CR_TURN_P   = 2,  // turn to red+ bi-FIFO reads
    CR_TURN_M   = 3,  // turn to red- bi-FIFO reads
    CR_EJECT    = 4   // ejection bi-FIFO reads
  } cred_idx_e;

  // Router ports; an input named X is fed by the neighbour in direction X,
  // an output named X feeds the neighbour in direction X.
  typedef enum logic [2:0] {
    P_BLUE_P = 3'd0,
    P_BLUE_M = 3'd1,
    P_RED_P  = 3'd2,
    P_RED_M  = 3'd3,
    P_LOCAL  = 3'd4
  } port_e;

  localparam logic [1:0] C_EJECT    = 2'b00;
  localparam logic [1:0] C_STRAIGHT = 2'b01;
  localparam logic [1:0] C_TURN_P   = 2'b10;
  localparam logic [1:0] C_TURN_M   = 2'b11;

  function automatic logic f_valid(flit_t f);
    return f[FLIT_W-1];
  endfunction

  function automatic ftype_e f_type(flit_t f);
    return ftype_e'(f[FLIT_W-2 -: 2]);
  endfunction

  function automatic logic f_head(flit_t f);
    return f[FLIT_W-1] && (f[FLIT_W-2 -: 2] == FT_HEAD);
  endfunction

  function automatic logic f_tail(flit_t f);
    return f[FLIT_W-1] && (f[FLIT_W-2 -: 2] == FT_TAIL);
  endfunction

  // Route code the current router acts on.
  function automatic logic [1:0] f_code(flit_t f);
    return f[ROUTE_W-1 -: 2];
  endfunction

  // Code the next router will act on (the code after the current one).
  function automatic logic [1:0] f_next_code(flit_t f);
    return f[ROUTE_W-3 -: 2];
  endfunction

  // Header route shift applied on every output: drop the current hop code.
  function automatic flit_t f_shift(flit_t f);
    flit_t r;
    r = f;
    if (f_head(f)) r[ROUTE_W-1:0] = {f[ROUTE_W-3:0], 2'b00};
    return r;
  endfunction

  // Downstream buffer of a code read on a network input of the given colour.
  function automatic tgt_e code_to_tgt(logic [1:0] code, logic is_blue);
    case (code)
      C_STRAIGHT: return TGT_STRAIGHT;
      C_TURN_P:   return is_blue ? TGT_TURN_P : TGT_EJECT;
      C_TURN_M:   return is_blue ? TGT_TURN_M : TGT_EJECT;
      default:    return TGT_EJECT;
    endcase
  endfunction

  // Binary <-> gray conversion for the credit counts.
  function automatic logic [CNT_W-1:0] bin2gray(logic [CNT_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [CNT_W-1:0] gray2bin(logic [CNT_W-1:0] g);
    logic [CNT_W-1:0] b;
    b[CNT_W-1] = g[CNT_W-1];
    for (int i = CNT_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
