// mae_env: stimulus, reference check and event counting for one sram_mae.
//
// The environment loads every context with a random {state, MPS}, then
// feeds a symbol stream in four phases and checks every symbol that leaves
// the stage, in order, against a sequential reference model:
//   1. full rate: consecutive contexts, no repeats within the window. With
//      S <= B no two symbols of a cycle share a bank, so the stage must
//      accept S symbols every cycle, and the first symbol must be registered
//      onto the output by the third clock edge after the edge that accepted
//      it (one cycle in each of AG, read and update).
//   2. mixed: repeated contexts (forwarding), ctx+1 runs, bypass and
//      termination symbols, a small hot set of contexts, and an input that
//      sometimes offers fewer symbols than it could (bubbles).
//   3. bank pressure: contexts that all map to bank 0 (port collisions).
//   4. read-back: every context once, which checks the final SRAM contents.
// It counts the events reported by the stage and fails if a mechanism that
// the configuration has never happened.
module mae_env
  import mae_pkg::*;
  import mae_tb_pkg::*;
#(
  parameter int unsigned S            = 4,
  parameter int unsigned B            = 4,
  parameter bit          THROW_CATCH  = 1'b1,
  parameter bit          RW_ISOLATION = 1'b1,
  parameter int unsigned N_MIX        = 2000,
  parameter int unsigned SEED         = 1,
  parameter bit          REQUIRE_MECH = 1'b1,  // fail if a mechanism never occurs
  parameter bit          BUBBLES      = 1'b1,  // input sometimes offers fewer
  parameter int unsigned CNT_W        = $clog2(S + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] in_num,
  output sym_in_t          in_sym  [S],
  input  logic [CNT_W-1:0] in_take,
  input  logic [CNT_W-1:0] out_num,
  input  sym_out_t         out_sym [S],
  output logic             init_we,
  output logic [CTX_W-1:0] init_ctx,
  output pstate_t          init_ps,
  input  mae_ev_t          ev,
  input  logic             busy,
  output logic             finished,
  output int unsigned      checks,
  output int unsigned      failures,
  output int unsigned      mix_syms,     // symbols accepted in the mixed phase
  output int unsigned      mix_cycles    // cycles the mixed phase was offered input
);

  localparam int unsigned N_RATE = 32 * S;
  localparam int unsigned N_BANK = 40 * S;
  localparam int unsigned N_ALL  = N_RATE + N_MIX + N_BANK + NUM_CTX;

  sym_in_t     list [N_ALL];
  pstate_t     ref_mem [NUM_CTX];
  int unsigned idx, oidx, offer_lim, cyc;
  logic        driving;
  int unsigned cnt_thrown, cnt_caught, cnt_rd, cnt_wr, cnt_rdc, cnt_wrc;
  int unsigned cnt_erd, cnt_ewr, cnt_stall, cnt_byp, cnt_term, cnt_bubble;
  int unsigned rate_short, first_take_cyc, first_out_cyc;

  // ---------------- stimulus list ----------------
  function automatic logic [CTX_W-1:0] rnd_ctx();
    logic [CTX_W-1:0] c;
    do c = CTX_W'($urandom % NUM_CTX); while (c == CTX_W'(TERM_CTX));
    return c;
  endfunction

  initial begin
    int unsigned p, r;
    logic [CTX_W-1:0] c;
    void'($urandom(SEED));
    p = 0;
    c = 10;
    for (int unsigned k = 0; k < N_RATE; k++) begin
      list[p] = '{ctx: c, bin: 1'($urandom), bypass: 1'b0};
      c = (c >= 400) ? 10 : c + 1;
      p++;
    end
    c = rnd_ctx();
    for (int unsigned k = 0; k < N_MIX; k++) begin
      r = $urandom % 100;
      if (r < 35)      ;                              // same ctx again
      else if (r < 65) c = (c >= 458) ? 0 : c + 1;    // neighbouring ctx
      else if (r < 80) c = CTX_W'(60 + $urandom % 6); // hot set
      else             c = rnd_ctx();
      if (c == CTX_W'(TERM_CTX)) c = c + 1;
      r = $urandom % 100;
      if (r < 10)
        list[p] = '{ctx: c, bin: 1'($urandom), bypass: 1'b1};
      else if (r < 13)
        list[p] = '{ctx: CTX_W'(TERM_CTX), bin: 1'($urandom % 8 == 0), bypass: 1'b0};
      else
        list[p] = '{ctx: c, bin: 1'($urandom % 4 == 0), bypass: 1'b0};
      p++;
    end
    for (int unsigned k = 0; k < N_BANK; k++) begin
      c = CTX_W'(B * ($urandom % 6));
      list[p] = '{ctx: c, bin: 1'($urandom), bypass: 1'b0};
      p++;
    end
    for (int unsigned k = 0; k < NUM_CTX; k++) begin
      list[p] = '{ctx: CTX_W'(k), bin: 1'($urandom), bypass: 1'b0};
      p++;
    end
  end

  // ---------------- driver ----------------
  always_comb begin
    int unsigned n;
    n = 0;
    if (driving) begin
      n = N_ALL - idx;
      if (n > S) n = S;
      if (idx >= N_RATE && n > offer_lim) n = offer_lim;
      // let the full-rate phase drain before the mixed phase starts
      if (idx == N_RATE && busy) n = 0;
    end
    in_num = CNT_W'(n);
    for (int unsigned l = 0; l < S; l++)
      in_sym[l] = (idx + l < N_ALL) ? list[idx + l] : '0;
  end

  always_ff @(posedge clk) begin
    if (driving) begin
      if (idx == 0 && in_take != 0) first_take_cyc <= cyc;
      if (idx < N_RATE && idx > 0 && in_take != CNT_W'(S)) rate_short <= rate_short + 1;
      idx <= idx + int'(in_take);
      if (idx >= N_RATE && idx < N_RATE + N_MIX && in_num != 0) begin
        mix_cycles <= mix_cycles + 1;
        mix_syms   <= mix_syms + int'(in_take);
      end
      for (int unsigned l = 0; l < S; l++)
        if (l < int'(in_take) && (list[idx + l].bypass)) cnt_byp <= cnt_byp + 1;
    end
    offer_lim <= (BUBBLES && $urandom % 5 == 0) ? $urandom % (S + 1) : S;
  end

  // ---------------- checker and event counters ----------------
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !init_we) begin
      for (int unsigned l = 0; l < S; l++) begin
        if (l < int'(out_num)) begin
          automatic sym_in_t  e   = list[oidx + l];
          automatic logic     et  = !e.bypass && e.ctx == CTX_W'(TERM_CTX);
          automatic pstate_t  eps = (e.bypass || et) ? PS_CONST : ref_mem[e.ctx];
          checks = checks + 1;
          if (oidx + l == 0) first_out_cyc <= cyc;
          if (out_sym[l].ctx != e.ctx || out_sym[l].bin != e.bin ||
              out_sym[l].bypass != e.bypass || out_sym[l].term != et ||
              out_sym[l].ps != eps) begin
            failures = failures + 1;
            if (failures < 10)
              $display("MISMATCH S=%0d B=%0d sym %0d ctx %0d: got ps %0d/%0d exp %0d/%0d",
                       S, B, oidx + l, e.ctx, out_sym[l].ps.state, out_sym[l].ps.mps,
                       eps.state, eps.mps);
          end
          if (et) cnt_term <= cnt_term + 1;
          if (!e.bypass && !et) ref_mem[e.ctx] = ref_next(ref_mem[e.ctx], e.bin);
        end
      end
      oidx <= oidx + int'(out_num);
      cnt_thrown <= cnt_thrown + int'(ev.thrown);
      cnt_caught <= cnt_caught + int'(ev.caught);
      cnt_rd     <= cnt_rd + int'(ev.sram_rd);
      cnt_wr     <= cnt_wr + int'(ev.sram_wr);
      cnt_rdc    <= cnt_rdc + int'(ev.rd_coll);
      cnt_wrc    <= cnt_wrc + int'(ev.wr_coll);
      cnt_erd    <= cnt_erd + int'(ev.early_rd);
      cnt_ewr    <= cnt_ewr + int'(ev.early_wr);
      if (ev.stall && busy) cnt_stall <= cnt_stall + 1;
      if (driving && int'(in_num) < S && idx > N_RATE && idx < N_ALL - S) cnt_bubble <= cnt_bubble + 1;
    end
  end

  task automatic need(input string what, input int unsigned n, input bit required);
    if (required && REQUIRE_MECH) begin
      checks = checks + 1;
      if (n == 0) begin
        failures = failures + 1;
        $display("S=%0d B=%0d: mechanism never seen: %s", S, B, what);
      end
    end
  endtask

  // ---------------- sequence ----------------
  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    idx = 0; oidx = 0; cyc = 0; offer_lim = S; driving = 1'b0;
    cnt_thrown = 0; cnt_caught = 0; cnt_rd = 0; cnt_wr = 0; cnt_rdc = 0; cnt_wrc = 0;
    cnt_erd = 0; cnt_ewr = 0; cnt_stall = 0; cnt_byp = 0; cnt_term = 0; cnt_bubble = 0;
    rate_short = 0; first_take_cyc = 0; first_out_cyc = 0; mix_syms = 0; mix_cycles = 0;
    init_we = 1'b0; init_ctx = '0; init_ps = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int unsigned c = 0; c < NUM_CTX; c++) begin
      pstate_t p;
      p.state = ($urandom % 5 == 0) ? 6'd0 : 6'($urandom % 63);
      p.mps   = 1'($urandom);
      ref_mem[c] = p;
      init_we  = 1'b1;
      init_ctx = CTX_W'(c);
      init_ps  = p;
      @(negedge clk);
    end
    init_we = 1'b0;
    @(negedge clk);
    @(negedge clk);
    driving = 1'b1;
    wait (idx == N_ALL);
    @(negedge clk);
    driving = 1'b0;
    wait (!busy && oidx == N_ALL);
    @(negedge clk);
    checks = checks + 1;
    if (oidx != N_ALL) failures = failures + 1;
    // rate: S symbols accepted every cycle in the full-rate phase (S <= B)
    if (S <= B) begin
      checks = checks + 1;
      if (rate_short != 0) begin
        failures = failures + 1;
        $display("S=%0d B=%0d: full-rate phase lost %0d cycles", S, B, rate_short);
      end
    end
    // latency of the first symbol: accepted at edge e, output after edge e+3
    // (with B < S the full-rate phase collides and the window moves slower)
    if (S <= B) begin
      checks = checks + 1;
      if (first_out_cyc - first_take_cyc != 4) begin
        failures = failures + 1;
        $display("S=%0d B=%0d: first-symbol latency %0d", S, B, first_out_cyc - first_take_cyc);
      end
    end
    need("SRAM read", cnt_rd, 1);
    need("SRAM write", cnt_wr, 1);
    need("register-path catch", cnt_caught, 1);
    need("bypass symbol", cnt_byp, 1);
    need("termination symbol", cnt_term, 1);
    need("input bubble", cnt_bubble, BUBBLES);
    need("throw-backward", cnt_thrown, THROW_CATCH);
    need("read port collision", cnt_rdc, S > 1);
    need("write port collision", cnt_wrc, S > 1);
    need("stall (shift < S)", cnt_stall, S > 1);
    need("early read (isolation)", cnt_erd, RW_ISOLATION && S > 1);
    need("early update (isolation)", cnt_ewr, RW_ISOLATION && S > 1);
    $display("S=%0d B=%0d TC=%0d ISO=%0d: %0d symbols in %0d cycles; reads %0d writes %0d thrown %0d caught %0d rd_coll %0d wr_coll %0d early_rd %0d early_wr %0d stall %0d",
             S, B, THROW_CATCH, RW_ISOLATION, N_ALL, cyc, cnt_rd, cnt_wr, cnt_thrown,
             cnt_caught, cnt_rdc, cnt_wrc, cnt_erd, cnt_ewr, cnt_stall);
    finished = 1'b1;
  end

endmodule
