// tb_state_update: exhaustive check of the probability-state transition.
// All 64 states x 2 MPS values x 2 symbol values are applied and compared
// with the reference model; a few hand-worked cases are checked as well.
module tb_state_update;
  import mae_pkg::*;
  import mae_tb_pkg::*;

  pstate_t ps_in, ps_out;
  logic    bin;
  int unsigned checks = 0, failures = 0;

  state_update u_dut (.ps_in, .bin, .ps_out);

  task automatic expect_eq(input pstate_t exp);
    checks++;
    if (ps_out != exp) begin
      failures++;
      $display("state %0d mps %0d bin %0d: got %0d/%0d exp %0d/%0d", ps_in.state, ps_in.mps,
               bin, ps_out.state, ps_out.mps, exp.state, exp.mps);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++)
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < 2; b++) begin
          ps_in = '{state: 6'(s), mps: 1'(m)};
          bin   = 1'(b);
          #1;
          expect_eq(ref_next(ps_in, bin));
        end
    // hand-worked: LPS in state 0 flips the MPS and stays in state 0
    ps_in = '{state: 6'd0, mps: 1'b1}; bin = 1'b0; #1; expect_eq('{state: 6'd0, mps: 1'b0});
    // MPS saturates at 62
    ps_in = '{state: 6'd62, mps: 1'b0}; bin = 1'b0; #1; expect_eq('{state: 6'd62, mps: 1'b0});
    // LPS from 20 goes to 16
    ps_in = '{state: 6'd20, mps: 1'b0}; bin = 1'b1; #1; expect_eq('{state: 6'd16, mps: 1'b0});
    // constant pair of bypass/termination is left alone
    ps_in = PS_CONST; bin = 1'b1; #1; expect_eq(PS_CONST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
