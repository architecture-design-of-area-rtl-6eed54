// tb_bank_sweep: throughput loss against the number of banks.
//
// Two-symbol stages with 1..6 banks and four-symbol stages with 1..10
// banks, each in three method sets:
//   mode 0  modular banks with data forwarding only,
//   mode 1  plus throw-backward/catch-forward,
//   mode 2  plus read/write isolation (the full design).
// Every configuration runs the same synthetic context stream through
// mae_env, which checks every symbol against the reference model. The
// throughput loss of the mixed phase, 1 - (symbols per cycle) / S, is
// printed for each configuration. The stream is synthetic (runs of equal
// and neighbouring contexts, bypass and termination symbols), not coded
// video, so the numbers show trends only.
// Checked besides correctness: for every (S, B) the full design loses no
// more than modular banks alone, and for each S and mode one bank loses
// more than S banks.
module tb_bank_sweep;
  import mae_pkg::*;

  localparam int unsigned NCFG = 3 * (6 + 10);

  function automatic int unsigned cfg_s(input int unsigned g);
    return ((g % 16) < 6) ? 2 : 4;
  endfunction
  function automatic int unsigned cfg_b(input int unsigned g);
    return ((g % 16) < 6) ? (g % 16) + 1 : (g % 16) - 5;
  endfunction
  function automatic int unsigned cfg_mode(input int unsigned g);
    return g / 16;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic        fin  [NCFG];
  int unsigned chk  [NCFG];
  int unsigned fl   [NCFG];
  int unsigned msym [NCFG];
  int unsigned mcyc [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned S = cfg_s(g);
    localparam int unsigned B = cfg_b(g);
    localparam bit TC  = cfg_mode(g) >= 1;
    localparam bit ISO = cfg_mode(g) >= 2;
    localparam int unsigned CNT_W = $clog2(S + 1);
    logic [CNT_W-1:0] in_num, in_take, out_num;
    sym_in_t  in_sym [S];
    sym_out_t out_sym [S];
    logic init_we, busy;
    logic [CTX_W-1:0] init_ctx;
    pstate_t init_ps;
    mae_ev_t ev;

    sram_mae #(.S(S), .B(B), .THROW_CATCH(TC), .RW_ISOLATION(ISO)) u_dut (
      .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
      .init_we, .init_ctx, .init_ps, .ev, .busy
    );

    mae_env #(.S(S), .B(B), .THROW_CATCH(TC), .RW_ISOLATION(ISO),
              .N_MIX(3000), .SEED(5), .REQUIRE_MECH(1'b0), .BUBBLES(1'b0)) u_env (
      .clk, .rst_n, .in_num, .in_sym, .in_take, .out_num, .out_sym,
      .init_we, .init_ctx, .init_ps, .ev, .busy,
      .finished(fin[g]), .checks(chk[g]), .failures(fl[g]),
      .mix_syms(msym[g]), .mix_cycles(mcyc[g])
    );
  end

  // loss in units of 0.1 %
  function automatic int unsigned loss_pm(input int unsigned g);
    return 1000 - (1000 * msym[g]) / (cfg_s(g) * mcyc[g]);
  endfunction

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
      $display("S=%0d B=%2d mode %0d: throughput loss %0d.%0d %%", cfg_s(g), cfg_b(g),
               cfg_mode(g), loss_pm(g) / 10, loss_pm(g) % 10);
    end
    for (int g = 0; g < 16; g++) begin
      c++;
      if (loss_pm(g + 32) > loss_pm(g)) begin
        f++;
        $display("S=%0d B=%0d: full design loses more than modular banks alone",
                 cfg_s(g), cfg_b(g));
      end
    end
    for (int m = 0; m < 3; m++) begin
      // S=2: B=1 is index 0, B=2 index 1; S=4: B=1 is index 6, B=4 index 9
      c += 2;
      if (loss_pm(16 * m) <= loss_pm(16 * m + 1)) f++;
      if (loss_pm(16 * m + 6) <= loss_pm(16 * m + 9)) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int unsigned c, f;
    repeat (200000) @(posedge clk);
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
