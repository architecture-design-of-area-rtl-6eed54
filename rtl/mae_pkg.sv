// mae_pkg: types and constants shared by the SRAM-based multi-symbol
// arithmetic encoder state stage.
//
// A context (ctx) selects one adaptive probability state {state, MPS}:
// a 6-bit state index and the value of the most probable symbol. H.264
// CABAC has 460 contexts (0..459); context 276 is the termination context.
// Bypass and termination symbols do not use stored probability states and
// carry the constant pair {63, 0} through the pipeline.
//
// Contexts are spread over the SRAM banks by ctx_bank()/ctx_word().
//
// The per-cycle event record (mae_ev_t) counts what the state stage did in
// one clock cycle; it is a performance-monitoring output of this design.
package mae_pkg;

  localparam int unsigned NUM_CTX  = 460;   // contexts in H.264 CABAC
  localparam int unsigned CTX_W    = 9;     // bits to hold 0..459
  localparam int unsigned TERM_CTX = 276;   // termination context

  // One probability state: 6-bit state index and the MPS bit.
  typedef struct packed {
    logic [5:0] state;
    logic       mps;
  } pstate_t;

  // Constant pair used for bypass and termination symbols.
  localparam pstate_t PS_CONST = '{state: 6'd63, mps: 1'b0};

  // A binary symbol as delivered by binarization/context modelling.
  typedef struct packed {
    logic [CTX_W-1:0] ctx;
    logic             bin;
    logic             bypass;
  } sym_in_t;

  // A symbol leaving the state stage, with the {state, MPS} that the
  // range stage uses for its rangeLPS lookup (the value before update).
  typedef struct packed {
    logic [CTX_W-1:0] ctx;
    logic             bin;
    logic             bypass;
    logic             term;
    pstate_t          ps;
  } sym_out_t;

  // Events in one cycle (each field is a count within that cycle).
  typedef struct packed {
    logic [7:0] shift;      // symbols that left the update stage
    logic [7:0] sram_rd;    // SRAM bank reads issued
    logic [7:0] sram_wr;    // SRAM bank writes issued
    logic [7:0] thrown;     // updates thrown backward instead of written
    logic [7:0] caught;     // states taken from the register path
    logic [7:0] rd_coll;    // reads refused: bank read port taken
    logic [7:0] wr_coll;    // updates refused: bank write port taken
    logic [7:0] early_rd;   // reads issued for symbols that did not advance
    logic [7:0] early_wr;   // updates done for symbols that did not leave
    logic       stall;      // fewer than S symbols advanced
  } mae_ev_t;

  // Modular bank partitioning: with nbanks banks, context ctx lives in
  // bank (ctx % nbanks) at word (ctx / nbanks). Neighbouring symbols usually
  // have contexts that differ by one, so they land in different banks.
  // Called with a constant bank count, so no divider is built.
  function automatic int unsigned ctx_bank(input logic [CTX_W-1:0] ctx,
                                           input int unsigned nbanks);
    return int'(ctx) % nbanks;
  endfunction

  function automatic int unsigned ctx_word(input logic [CTX_W-1:0] ctx,
                                           input int unsigned nbanks);
    return int'(ctx) / nbanks;
  endfunction

endpackage
