// tb_ctx_sram_bank: one context bank (default depth 115) against a model.
// The bank is filled through the write port, then random reads and writes
// to distinct words run back to back. Every read must return, two cycles
// after it was requested, the word as left by all writes requested before
// the read was requested.
module tb_ctx_sram_bank;
  import mae_pkg::*;

  localparam int unsigned DEPTH = 115;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pstate_t rd_data, wr_data;
  pstate_t model [DEPTH];
  pstate_t exp_q [2];
  logic    exp_v [2];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctx_sram_bank u_dut (.clk, .rst_n, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  // expected read data pipeline: value captured when the read is requested
  always_ff @(posedge clk) begin
    exp_v[0] <= rd_en;
    exp_q[0] <= model[rd_addr];
    exp_v[1] <= exp_v[0];
    exp_q[1] <= exp_q[0];
    if (wr_en) model[wr_addr] <= wr_data;
  end

  always @(negedge clk) begin
    if (rst_n && exp_v[1]) begin
      checks++;
      if (rd_data != exp_q[1]) begin
        failures++;
        $display("read mismatch: got %0d/%0d exp %0d/%0d", rd_data.state, rd_data.mps,
                 exp_q[1].state, exp_q[1].mps);
      end
    end
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    exp_v = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = '{state: 6'($urandom), mps: 1'($urandom)};
      @(negedge clk);
    end
    wr_en = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      rd_en   = 1'($urandom);
      rd_addr = AW'($urandom % DEPTH);
      wr_en   = 1'($urandom);
      do wr_addr = AW'($urandom % DEPTH); while (wr_addr == rd_addr);
      wr_data = '{state: 6'($urandom), mps: 1'($urandom)};
      @(negedge clk);
    end
    rd_en = 1'b0; wr_en = 1'b0;
    // read back every word
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
    end
    rd_en = 1'b0;
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
