// mae_tb_pkg: reference model for the state-stage testbenches.
//
// ref_next() is a sequential, one-symbol-at-a-time model of the H.264/AVC
// probability-state transition, written from the standard's rules and
// independent of the RTL: the testbenches replay the symbol stream in
// order through it to know which {state, MPS} every symbol must carry.
package mae_tb_pkg;
  import mae_pkg::*;

  // H.264/AVC transIdxLPS, as a table.
  localparam byte unsigned LPS_NEXT [64] = '{
     0,  0,  1,  2,  2,  4,  4,  5,  6,  7,  8,  9,  9, 11, 11, 12,
    13, 13, 15, 15, 16, 16, 18, 18, 19, 19, 21, 21, 22, 22, 23, 24,
    24, 25, 26, 26, 27, 27, 28, 29, 29, 30, 30, 30, 31, 32, 32, 33,
    33, 33, 34, 34, 35, 35, 35, 36, 36, 36, 37, 37, 37, 38, 38, 63
  };

  function automatic pstate_t ref_next(pstate_t p, logic bin);
    pstate_t n;
    int unsigned st;
    n  = p;
    st = int'(p.state);
    if (st == 63) return p;
    if (bin == p.mps) begin
      n.state = (st >= 62) ? 6'd62 : 6'(st + 1);
    end else begin
      n.state = 6'(LPS_NEXT[st]);
      n.mps   = (st == 0) ? !p.mps : p.mps;
    end
    return n;
  endfunction

endpackage
