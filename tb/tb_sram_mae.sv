// tb_sram_mae: end-to-end test of sram_mae at its default configuration
// (4 symbols per cycle, 4 banks, throw-backward/catch-forward and read/write
// isolation on). Every symbol leaving the stage is checked against a
// sequential reference model; see mae_env for the phases and the events
// that must occur.
module tb_sram_mae;
  import mae_pkg::*;

  localparam int unsigned S = 4;
  localparam int unsigned CNT_W = $clog2(S + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CNT_W-1:0] in_num, in_take, out_num;
  sym_in_t  in_sym [S];
  sym_out_t out_sym [S];
  logic init_we, busy, finished;
  logic [CTX_W-1:0] init_ctx;
  pstate_t init_ps;
  mae_ev_t ev;
  int unsigned checks, failures;

  always #5 clk = ~clk;

  sram_mae u_dut (
    .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
    .init_we, .init_ctx, .init_ps, .ev, .busy
  );

  mae_env #(.S(S), .B(4), .THROW_CATCH(1'b1), .RW_ISOLATION(1'b1),
            .N_MIX(20000), .SEED(7)) u_env (
    .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
    .init_we, .init_ctx, .init_ps, .ev, .busy, .finished, .checks, .failures,
    .mix_syms(), .mix_cycles()
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
