// tb_state_stage_ctrl: the state-stage control in several configurations.
//
// Each configuration is an sram_mae (control plus real SRAM banks) driven
// and checked by its own mae_env:
//   S=1 B=1  one symbol per cycle, single bank: must run at full rate;
//   S=2 B=2  throw-backward/catch-forward and read/write isolation;
//   S=2 B=2  modular banks and forwarding only (both methods off);
//   S=4 B=4  throw/catch only;  S=4 B=4 isolation only;
//   S=3 B=5  a bank count that is not a power of two.
module tb_state_stage_ctrl;
  import mae_pkg::*;

  localparam int unsigned NCFG = 6;
  localparam int unsigned CS  [NCFG] = '{1, 2, 2, 4, 4, 3};
  localparam int unsigned CB  [NCFG] = '{1, 2, 2, 4, 4, 5};
  localparam bit          CTC [NCFG] = '{1, 1, 0, 1, 0, 1};
  localparam bit          CIS [NCFG] = '{1, 1, 0, 0, 1, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic        fin [NCFG];
  int unsigned chk [NCFG];
  int unsigned fl  [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned S = CS[g];
    localparam int unsigned CNT_W = $clog2(S + 1);
    logic [CNT_W-1:0] in_num, in_take, out_num;
    sym_in_t  in_sym [S];
    sym_out_t out_sym [S];
    logic init_we, busy;
    logic [CTX_W-1:0] init_ctx;
    pstate_t init_ps;
    mae_ev_t ev;

    sram_mae #(.S(S), .B(CB[g]), .THROW_CATCH(CTC[g]), .RW_ISOLATION(CIS[g])) u_dut (
      .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
      .init_we, .init_ctx, .init_ps, .ev, .busy
    );

    mae_env #(.S(S), .B(CB[g]), .THROW_CATCH(CTC[g]), .RW_ISOLATION(CIS[g]),
              .N_MIX(4000), .SEED(11 + g)) u_env (
      .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
      .init_we, .init_ctx, .init_ps, .ev, .busy,
      .finished(fin[g]), .checks(chk[g]), .failures(fl[g]),
      .mix_syms(), .mix_cycles()
    );
  end

  initial begin
    int unsigned c, f;
    logic all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int g = 0; g < NCFG; g++) if (!fin[g]) all = 1'b0;
    end while (!all);
    c = 0; f = 0;
    for (int g = 0; g < NCFG; g++) begin
      c += chk[g];
      f += fl[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int unsigned c, f;
    repeat (100000) @(posedge clk);
    c = 0; f = 1;
    for (int g = 0; g < NCFG; g++) begin
      c += chk[g];
      f += fl[g];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

endmodule
