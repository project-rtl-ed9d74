// SRAM interface of the processor: registered address, data and strobes.
//
// Every signal the processor sends towards the SRAM leaves a flip-flop, so
// that no combinational glitch can reach the memory:
//   * SramAddr loads, every clock, the output of a multiplexer that picks
//     the PC (instruction fetch, PC_R0 = 1) or R0 (load/store, PC_R0 = 0).
//     The 512-word SRAM is split in two halves: fetches use words 0..255
//     (address bit 8 clear) and a data address A in R0 is sent as 256 + A,
//     so a store can never overwrite the program.
//   * SramData loads the bus every clock; the memory only takes it while
//     Sram_Write is high.
//   * Sram_Read and Sram_Write are the control circuit's Read and Write,
//     delayed by one register; an assertion checks that the two are
//     never requested in the same cycle.
// All of this follows the original design.  Using the low eight bits of PC
// and R0 as the in-half address is this design's reading of the 256/256
// split.  Timing: what the control circuit sets up in one cycle is seen by
// the SRAM during the next cycle.  Reset clears all outputs.
module sp_sram_if
  import sp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [WORD_W-1:0] pc,
  input  logic [WORD_W-1:0] r0,
  input  logic [WORD_W-1:0] bus,
  input  logic              pc_r0,      // 1: address from PC, 0: from R0
  input  logic              read,
  input  logic              write,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [WORD_W-1:0] sram_data,
  output logic              sram_read,
  output logic              sram_write
);

  logic [ADDR_W-1:0] addr_mux;

  always_comb begin
    if (pc_r0) addr_mux = {1'b0, pc[ADDR_W-2:0]};   // code half
    else       addr_mux = {1'b1, r0[ADDR_W-2:0]};   // data half: 256 + A
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sram_addr  <= '0;
      sram_data  <= '0;
      sram_read  <= 1'b0;
      sram_write <= 1'b0;
    end else begin
      sram_addr  <= addr_mux;
      sram_data  <= bus;
      sram_read  <= read;
      sram_write <= write;
    end
  end

  // The control circuit never asks for a read and a write in the same cycle
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst) !(read && write));

endmodule
