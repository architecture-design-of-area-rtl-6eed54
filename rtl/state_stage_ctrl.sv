// state_stage_ctrl: control and register path of the SRAM-based
// multi-symbol state stage.
//
// The stage is a window of 3*S symbol slots, S per pipeline stage: address
// generation (AG, slots 2S..3S-1), SRAM read (slots S..2S-1) and update
// (slots 0..S-1). Slot 0 holds the oldest symbol. Every cycle the whole
// window moves towards slot 0 by `shift` (0..S) places: the `shift` oldest
// symbols leave the update stage with their {state, MPS}, and up to `shift`
// new symbols enter at the young end of the AG stage. Positions that
// receive no new symbol hold a bubble.
//
// Each slot carries its own {state, MPS} register (the register path). A
// symbol obtains its pair in one of three ways:
//  * SRAM path: a read of bank (ctx % B) issued while the symbol is in the
//    AG stage returns two cycles later, when the symbol is in the update
//    stage at the earliest;
//  * register path (data forwarding): if an older symbol with the same ctx
//    is still in the window, the symbol takes that symbol's updated pair as
//    soon as it is produced; with several older matches the nearest wins;
//  * bypass and termination (ctx 276) symbols take the constant {63, 0}.
// Inside the update stage the forwarding is combinational, so several
// symbols of one context can be updated in one cycle (a chain of S
// state_update units).
//
// Each bank has one read and one write port, granted to the oldest
// requester. A symbol in the AG stage is readable if it needs no read or was
// granted one; read_num counts consecutive readable symbols from the oldest
// AG slot. A symbol in the update stage is writable once it is updated and
// its new pair has gone somewhere: thrown backward to a younger symbol of
// the same ctx, or written to its bank. write_num counts consecutive
// writable symbols from slot 0. shift = min(read_num, write_num).
//
// Parameters:
//  S            symbols per cycle (window stage width)
//  B            SRAM banks; ctx lives in bank ctx % B at word ctx / B
//  THROW_CATCH  1: a symbol whose pair is forwarded needs no SRAM read, and
//               an update caught by a younger symbol needs no SRAM write.
//               0: every regular symbol reads and writes SRAM; forwarded
//               values still override what the SRAM returns.
//  RW_ISOLATION 1: reads and updates proceed for every symbol that can do
//               them, also beyond the readable/writable prefixes, preparing
//               later cycles. 0: only the `shift` advancing symbols read or
//               update.
//
// Interface: in_sym[0..in_num-1] are offered symbols, lane 0 the oldest;
// in_take (combinational, <= in_num) says how many are accepted at this
// clock edge. out_sym[0..out_num-1] are registered, lane 0 the oldest,
// and carry the pair each symbol is coded with (before update). The bank
// ports connect to ctx_sram_bank instances (read data two cycles after the
// request). ev reports the events of the current cycle.
//
// The window, the forwarding rules, the ports and the shift rule follow the
// described architecture; the slot bookkeeping (have/age/done flags), the
// in_num/in_take handshake and the bubble handling are this design's own.
module state_stage_ctrl
  import mae_pkg::*;
#(
  parameter int unsigned S            = 4,
  parameter int unsigned B            = 4,
  parameter bit          THROW_CATCH  = 1'b1,
  parameter bit          RW_ISOLATION = 1'b1,
  parameter int unsigned BANK_W       = (B > 1) ? $clog2(B) : 1,
  parameter int unsigned DEPTH        = (NUM_CTX + B - 1) / B,
  parameter int unsigned ADDR_W       = $clog2(DEPTH),
  parameter int unsigned CNT_W        = $clog2(S + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // symbols in
  input  logic [CNT_W-1:0]  in_num,
  input  sym_in_t           in_sym  [S],
  output logic [CNT_W-1:0]  in_take,
  // symbols out, with their {state, MPS}
  output logic [CNT_W-1:0]  out_num,
  output sym_out_t          out_sym [S],
  // SRAM bank ports
  output logic [B-1:0]      rd_en,
  output logic [ADDR_W-1:0] rd_addr [B],
  input  pstate_t           rd_data [B],
  output logic [B-1:0]      wr_en,
  output logic [ADDR_W-1:0] wr_addr [B],
  output pstate_t           wr_data [B],
  // status
  output mae_ev_t           ev,
  output logic              busy
);

  localparam int unsigned W     = 3 * S;
  localparam int unsigned IDX_W = $clog2(W);

  typedef struct packed {
    logic             valid;   // slot holds a symbol (else a bubble)
    logic             bin;
    logic             bypass;
    logic             term;    // termination symbol (ctx 276)
    logic [CTX_W-1:0] ctx;
    logic             have;    // st holds the symbol's input pair
    pstate_t          st;
    logic [1:0]       age;     // SRAM read in flight: data arrives at age 1
    logic             done;    // updated and its new pair disposed of
  } slot_t;

  slot_t slot_q [W];
  slot_t slot_d [W];

  // ---------------------------------------------------------------------
  // Per-slot context information (from registers only)
  // ---------------------------------------------------------------------
  logic [BANK_W-1:0] bank_a   [W];
  logic [ADDR_W-1:0] addr_a   [W];
  logic              reg_a    [W];   // regular symbol: uses a stored pair
  logic              prior_ex [W];   // an older regular symbol has this ctx
  logic [IDX_W-1:0]  prior_idx[W];   // nearest such older slot
  logic              young_ex [W];   // a younger regular symbol has this ctx
  logic              arrive   [W];   // SRAM data for this slot arrives now
  pstate_t           arr_ps   [W];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      bank_a[i] = BANK_W'(ctx_bank(slot_q[i].ctx, B));
      addr_a[i] = ADDR_W'(ctx_word(slot_q[i].ctx, B));
    end
  end

  always_comb begin
    logic r [W];
    for (int i = 0; i < W; i++)
      r[i] = slot_q[i].valid && !slot_q[i].bypass && !slot_q[i].term;
    for (int i = 0; i < W; i++) begin
      reg_a[i]     = r[i];
      prior_ex[i]  = 1'b0;
      prior_idx[i] = '0;
      young_ex[i]  = 1'b0;
      for (int j = 0; j < W; j++) begin
        if (r[i] && r[j] && slot_q[j].ctx == slot_q[i].ctx) begin
          if (j < i) begin
            prior_ex[i]  = 1'b1;
            prior_idx[i] = IDX_W'(j);
          end
          if (j > i) young_ex[i] = 1'b1;
        end
      end
      arrive[i] = slot_q[i].valid && slot_q[i].age == 2'd1;
      arr_ps[i] = rd_data[bank_a[i]];
    end
  end

  // ---------------------------------------------------------------------
  // AG stage: read port scheduling (read side, independent of updates)
  // ---------------------------------------------------------------------
  logic        rd_grant [S];
  logic        rd_coll  [S];
  logic [CNT_W-1:0] read_num;

  always_comb begin
    logic [B-1:0] used;
    logic         pfx;
    logic         need;
    used     = '0;
    pfx      = 1'b1;
    read_num = '0;
    for (int i = 2 * S; i < 3 * S; i++) begin
      need = reg_a[i] && !slot_q[i].have && slot_q[i].age == 2'd0 &&
             (!THROW_CATCH || !prior_ex[i]);
      rd_grant[i-2*S] = need && !used[bank_a[i]] && (RW_ISOLATION || pfx);
      rd_coll[i-2*S]  = need && used[bank_a[i]];
      if (rd_grant[i-2*S]) used[bank_a[i]] = 1'b1;
      if (pfx && (!need || rd_grant[i-2*S])) read_num = read_num + 1'b1;
      else pfx = 1'b0;
    end
  end

  // ---------------------------------------------------------------------
  // Update stage: chained selection, update and write port scheduling
  // ---------------------------------------------------------------------
  pstate_t in_c    [S];   // input pair of each update-stage slot
  logic    avail_c [S];   // that pair is known this cycle
  logic    caught_c[S];   // ... and comes from the register path
  pstate_t d_c     [S];   // updated pair
  logic    ud_c    [S];   // slot is updated (now or before)
  logic    upd_c   [S];   // slot is updated this cycle
  logic    wr_c    [S];   // ... and writes its bank
  logic    thr_c   [S];   // ... and throws its pair backward
  logic    wcoll_c [S];   // update refused for lack of a write port
  logic    pfx_c   [S];   // slots 0..j all writable

  for (genvar j = 0; j < S; j++) begin : g_c
    logic [B-1:0] wused_in, wused_out;
    logic         pfx_in, pfx_out;
    pstate_t      cand_ps [S];
    logic         cand_ud [S];
    pstate_t      in_ps, d_ps;
    logic         avail, caught, ud, upd, wr, need_wr, can_upd, wcoll;

    if (j == 0) begin : g_first
      assign wused_in = '0;
      assign pfx_in   = 1'b1;
    end else begin : g_next
      assign wused_in = g_c[j-1].wused_out;
      assign pfx_in   = g_c[j-1].pfx_out;
    end

    for (genvar k = 0; k < S; k++) begin : g_cand
      if (k < j) begin : g_old
        assign cand_ps[k] = g_c[k].d_ps;
        assign cand_ud[k] = g_c[k].ud;
      end else begin : g_none
        assign cand_ps[k] = PS_CONST;
        assign cand_ud[k] = 1'b0;
      end
    end

    always_comb begin
      avail  = 1'b0;
      caught = 1'b0;
      in_ps  = PS_CONST;
      if (!reg_a[j]) begin
        avail = 1'b1;
      end else if (slot_q[j].have) begin
        avail = 1'b1;
        in_ps = slot_q[j].st;
      end else if (prior_ex[j]) begin
        for (int k = 0; k < S; k++) begin
          if (prior_idx[j] == IDX_W'(k)) begin
            avail  = cand_ud[k];
            caught = cand_ud[k];
            in_ps  = cand_ps[k];
          end
        end
      end else if (arrive[j]) begin
        avail = 1'b1;
        in_ps = arr_ps[j];
      end
    end

    state_update u_upd (.ps_in(in_ps), .bin(slot_q[j].bin), .ps_out(d_ps));

    always_comb begin
      need_wr   = !THROW_CATCH || !young_ex[j];
      can_upd   = reg_a[j] && !slot_q[j].done && avail &&
                  (RW_ISOLATION || (pfx_in && j < read_num));
      upd       = can_upd && (!need_wr || !wused_in[bank_a[j]]);
      wcoll     = can_upd && need_wr && wused_in[bank_a[j]];
      wr        = upd && need_wr;
      wused_out = wused_in;
      if (wr) wused_out[bank_a[j]] = 1'b1;
      ud        = slot_q[j].done || upd;
      pfx_out   = pfx_in && (!reg_a[j] || ud);
    end

    assign in_c[j]     = in_ps;
    assign avail_c[j]  = avail;
    assign caught_c[j] = caught;
    assign d_c[j]      = d_ps;
    assign ud_c[j]     = ud;
    assign upd_c[j]    = upd;
    assign wr_c[j]     = wr;
    assign thr_c[j]    = upd && !need_wr;
    assign wcoll_c[j]  = wcoll;
    assign pfx_c[j]    = pfx_out;
  end

  // ---------------------------------------------------------------------
  // Shift, captures, bank requests, outputs
  // ---------------------------------------------------------------------
  logic [CNT_W-1:0] write_num, shift;
  sym_out_t    out_d [S];
  logic [CNT_W-1:0] out_num_d;
  mae_ev_t     ev_d;

  always_comb begin
    slot_t       r [W];
    pstate_t     ps;
    logic        av, cg, commit;
    int unsigned k, n, o, take;

    k = 0;
    n = 0;
    o = 0;
    av = 1'b0;
    cg = 1'b0;
    ps = PS_CONST;
    commit = 1'b0;
    out_num_d = '0;
    for (int i = 0; i < S; i++) out_d[i] = '0;
    for (int i = 0; i < W; i++) begin
      r[i]      = slot_q[i];
      slot_d[i] = '0;
    end
    write_num = '0;
    for (int j = 0; j < S; j++) if (pfx_c[j]) write_num = write_num + 1'b1;
    shift = (read_num < write_num) ? read_num : write_num;
    take  = (in_num < shift) ? int'(in_num) : int'(shift);
    in_take = CNT_W'(take);

    ev_d       = '0;
    ev_d.shift = 8'(shift);
    ev_d.stall = (int'(shift) < S);
    rd_en      = '0;
    wr_en      = '0;
    for (int b = 0; b < B; b++) begin
      rd_addr[b] = '0;
      wr_addr[b] = '0;
      wr_data[b] = PS_CONST;
    end

    for (int i = 0; i < W; i++) begin
      r[i] = slot_q[i];
      // where the input pair comes from this cycle
      if (i < S) begin
        av = avail_c[i];
        cg = caught_c[i];
        ps = in_c[i];
      end else begin
        av = 1'b0;
        cg = 1'b0;
        ps = PS_CONST;
        if (prior_ex[i]) begin
          k = int'(prior_idx[i]);
          if (k < S) begin
            av = ud_c[k];
            cg = ud_c[k];
            ps = d_c[k];
          end
        end else if (arrive[i]) begin
          av = 1'b1;
          ps = arr_ps[i];
        end
      end
      if (reg_a[i] && !slot_q[i].have && av) begin
        r[i].have = 1'b1;
        r[i].st   = ps;
        if (cg) ev_d.caught++;
      end
      // SRAM read issue (AG stage) and read-in-flight ageing
      commit = 1'b0;
      if (i >= 2 * S) begin
        commit = rd_grant[i-2*S] && (RW_ISOLATION || (i - 2 * S) < shift);
        if (rd_coll[i-2*S]) ev_d.rd_coll++;
      end
      if (commit) begin
        r[i].age = 2'd2;
        rd_en[bank_a[i]]   = 1'b1;
        rd_addr[bank_a[i]] = addr_a[i];
        ev_d.sram_rd++;
        if ((i - 2 * S) >= shift) ev_d.early_rd++;
      end else if (slot_q[i].age != 2'd0) begin
        r[i].age = slot_q[i].age - 2'd1;
      end
      // update stage bookkeeping and writes
      if (i < S) begin
        if (upd_c[i]) begin
          r[i].done = 1'b1;
          if (i >= shift) ev_d.early_wr++;
        end
        if (wr_c[i]) begin
          wr_en[bank_a[i]]   = 1'b1;
          wr_addr[bank_a[i]] = addr_a[i];
          wr_data[bank_a[i]] = d_c[i];
          ev_d.sram_wr++;
        end
        if (thr_c[i])   ev_d.thrown++;
        if (wcoll_c[i]) ev_d.wr_coll++;
      end
    end

    // leaving symbols, packed oldest first
    for (int i = 0; i < S; i++) begin
      if (i < shift && slot_q[i].valid) begin
        out_d[o].ctx    = slot_q[i].ctx;
        out_d[o].bin    = slot_q[i].bin;
        out_d[o].bypass = slot_q[i].bypass;
        out_d[o].term   = slot_q[i].term;
        out_d[o].ps     = r[i].st;
        o++;
      end
    end
    out_num_d = CNT_W'(o);

    // move the window and append accepted symbols
    for (int i = 0; i < W; i++) begin
      if (i + int'(shift) < W) begin
        slot_d[i] = r[i+int'(shift)];
      end else begin
        n = i + int'(shift) - W;
        slot_d[i] = '0;
        if (n < take) begin
          slot_d[i].valid  = 1'b1;
          slot_d[i].ctx    = in_sym[n].ctx;
          slot_d[i].bin    = in_sym[n].bin;
          slot_d[i].bypass = in_sym[n].bypass;
          slot_d[i].term   = !in_sym[n].bypass && in_sym[n].ctx == CTX_W'(TERM_CTX);
          slot_d[i].have   = slot_d[i].bypass || slot_d[i].term;
          slot_d[i].st     = PS_CONST;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) slot_q[i] <= '0;
      for (int i = 0; i < S; i++) out_sym[i] <= '0;
      out_num <= '0;
      ev      <= '0;
    end else begin
      for (int i = 0; i < W; i++) slot_q[i] <= slot_d[i];
      for (int i = 0; i < S; i++) out_sym[i] <= out_d[i];
      out_num <= out_num_d;
      ev      <= ev_d;
    end
  end

  always_comb begin
    busy = (out_num != '0);
    for (int i = 0; i < W; i++) if (slot_q[i].valid) busy = 1'b1;
  end

  // A symbol may only leave the update stage once it has been updated.
  for (genvar i = 0; i < S; i++) begin : g_chk
    a_leave_updated: assert property (@(posedge clk) disable iff (!rst_n)
      (i < shift) |-> (!reg_a[i] || ud_c[i]))
      else $error("symbol left slot %0d without update", i);
  end
  a_take: assert property (@(posedge clk) disable iff (!rst_n) in_take <= in_num)
    else $error("accepted more than offered");

endmodule
