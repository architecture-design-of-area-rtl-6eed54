// ctx_sram_bank: one bank of the {state, MPS} context memory.
//
// A two-port memory (one read port, one write port) holding DEPTH
// probability states, surrounded by registers as in a typical SRAM macro
// integration: the read address, the write address and the write data are
// captured on the rising clock edge, the array itself is read and written
// on the falling edge, and the read data is registered again on the next
// rising edge.
//
// Timing: a read requested in cycle t (rd_en, rd_addr) returns its data on
// rd_data throughout cycle t+2. A write requested in cycle t (wr_en,
// wr_addr, wr_data) reaches the array at the falling edge inside cycle
// t+1. A read and a write of the same word at the same falling edge return
// the old contents (the controller never issues that case).
// The array is not reset; it is loaded through the write port.
module ctx_sram_bank
  import mae_pkg::*;
#(
  parameter int unsigned DEPTH  = 115,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output pstate_t           rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  pstate_t           wr_data
);

  pstate_t mem [DEPTH];

  logic              rd_en_q, wr_en_q;
  logic [ADDR_W-1:0] rd_addr_q, wr_addr_q;
  pstate_t           wr_data_q, sram_q;

  // Input registers (rising edge).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q   <= 1'b0;
      wr_en_q   <= 1'b0;
      rd_addr_q <= '0;
      wr_addr_q <= '0;
      wr_data_q <= '0;
    end else begin
      rd_en_q   <= rd_en;
      wr_en_q   <= wr_en;
      rd_addr_q <= rd_addr;
      wr_addr_q <= wr_addr;
      wr_data_q <= wr_data;
    end
  end

  // Memory array (falling edge).
  always_ff @(negedge clk) begin
    if (rd_en_q) sram_q <= mem[rd_addr_q];
    if (wr_en_q) mem[wr_addr_q] <= wr_data_q;
  end

  // Output register (rising edge).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else        rd_data <= sram_q;
  end

endmodule
