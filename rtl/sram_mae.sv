// sram_mae: state stage of an SRAM-based multi-symbol arithmetic encoder
// for H.264/AVC CABAC.
//
// Each binary symbol belongs to one of 460 contexts, and every context keeps
// an adaptive probability state {state, MPS} that must be read, updated
// and written back for each symbol. This block keeps those states in B
// small two-port SRAM banks (context ctx in bank ctx % B) instead of in
// registers, and still delivers up to S symbols per cycle with the pair
// each must be coded with, in order. Bubbles caused by the SRAM's
// read/update/write latency are removed by forwarding updated pairs
// between in-flight symbols of the same context (state_stage_ctrl).
//
// Interface:
//  * in_sym[0..in_num-1]: offered symbols (ctx, bin, bypass), lane 0
//    oldest; in_take of them are accepted at the clock edge.
//  * out_sym[0..out_num-1]: registered, in order, each with the {state,
//    MPS} to code it with (the input of the range/low stage, which is not
//    part of this block). No back-pressure: the consumer takes S per cycle.
//  * init_*: load the initial pair of one context per cycle (the values
//    come from the slice's context initialisation). Allowed only while
//    busy is low; the last load reaches the SRAM one cycle after it is
//    presented.
//  * ev: events of the previous cycle (registered), for performance counting.
//
// Latency: a symbol accepted at clock edge e leaves on out_sym after edge
// e+3 when the stage runs at full rate (one cycle in each of AG, read and
// update, then the output register).
//
// Default configuration: four symbols per cycle with four banks, the
// largest configuration evaluated; one- and two-symbol versions are the
// same RTL with S and B set to 1 or 2.
module sram_mae
  import mae_pkg::*;
#(
  parameter int unsigned S            = 4,
  parameter int unsigned B            = 4,
  parameter bit          THROW_CATCH  = 1'b1,
  parameter bit          RW_ISOLATION = 1'b1,
  parameter int unsigned CNT_W        = $clog2(S + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] in_num,
  input  sym_in_t          in_sym  [S],
  output logic [CNT_W-1:0] in_take,
  output logic [CNT_W-1:0] out_num,
  output sym_out_t         out_sym [S],
  input  logic             init_we,
  input  logic [CTX_W-1:0] init_ctx,
  input  pstate_t          init_ps,
  output mae_ev_t          ev,
  output logic             busy
);

  localparam int unsigned BANK_W = (B > 1) ? $clog2(B) : 1;
  localparam int unsigned DEPTH  = (NUM_CTX + B - 1) / B;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic [B-1:0]      rd_en, wr_en, bwr_en;
  logic [ADDR_W-1:0] rd_addr [B];
  logic [ADDR_W-1:0] wr_addr [B];
  logic [ADDR_W-1:0] bwr_addr [B];
  pstate_t           rd_data [B];
  pstate_t           wr_data [B];
  pstate_t           bwr_data [B];
  logic [BANK_W-1:0] init_bank;
  logic [ADDR_W-1:0] init_addr;

  state_stage_ctrl #(
    .S(S), .B(B), .THROW_CATCH(THROW_CATCH), .RW_ISOLATION(RW_ISOLATION),
    .BANK_W(BANK_W), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst_n,
    .in_num, .in_sym, .in_take,
    .out_num, .out_sym,
    .rd_en, .rd_addr, .rd_data,
    .wr_en, .wr_addr, .wr_data,
    .ev, .busy
  );

  always_comb begin
    init_bank = BANK_W'(ctx_bank(init_ctx, B));
    init_addr = ADDR_W'(ctx_word(init_ctx, B));
  end

  // Context initialisation shares the bank write ports.
  always_comb begin
    for (int b = 0; b < B; b++) begin
      bwr_en[b]   = wr_en[b];
      bwr_addr[b] = wr_addr[b];
      bwr_data[b] = wr_data[b];
      if (init_we && init_bank == BANK_W'(b)) begin
        bwr_en[b]   = 1'b1;
        bwr_addr[b] = init_addr;
        bwr_data[b] = init_ps;
      end
    end
  end

  for (genvar b = 0; b < B; b++) begin : g_bank
    ctx_sram_bank #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_bank (
      .clk, .rst_n,
      .rd_en   (rd_en[b]),
      .rd_addr (rd_addr[b]),
      .rd_data (rd_data[b]),
      .wr_en   (bwr_en[b]),
      .wr_addr (bwr_addr[b]),
      .wr_data (bwr_data[b])
    );
  end

  a_init_idle: assert property (@(posedge clk) disable iff (!rst_n)
    init_we |-> (!busy && in_num == '0))
    else $error("context initialisation while symbols are in flight");

endmodule
