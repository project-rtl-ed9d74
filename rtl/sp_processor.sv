// Simple processor: the single-bus datapath and its control circuit.
//
// A 16-bit processor with four general registers, twelve instructions,
// an 8-bit input port, an 8-bit output port and a 16-bit event counter.
// It fetches its program from words 0..255 of an external SRAM and keeps
// its data in words 256..511.  It stays idle, with PC at zero, while
// m68k_master is high (the 68000 then owns the SRAM) and starts at address
// 0 when m68k_master goes low.  Instruction word: opcode [15:12], X [11:10],
// Y [9:8], DATA [7:0].
//
// SRAM timing: address, write data, Sram_Read and Sram_Write leave
// registers; data_from_sram must be valid in the cycle after the one in
// which the control circuit asked for the read (that is, within one clock
// of Sram_Read rising).  halted is high once a halt instruction has
// executed.  The structure follows the original design; see sp_control and
// sp_datapath for the choices made where it was silent.
module sp_processor
  import sp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cnt_clk,
  input  logic              m68k_master,
  input  logic [PORT_W-1:0] port_in,
  output logic [PORT_W-1:0] port_out,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [WORD_W-1:0] sram_data,
  output logic              sram_read,
  output logic              sram_write,
  input  logic [WORD_W-1:0] data_from_sram,
  output logic              halted
);

  ctrl_t  ctrl;
  instr_t ir;
  logic   s;

  sp_control u_ctrl (
    .clk, .rst, .m68k_master, .ir, .s, .ctrl, .halted);

  sp_datapath u_dp (
    .clk, .rst, .cnt_clk, .ctrl, .ir, .s, .port_in, .port_out,
    .sram_addr, .sram_data, .sram_read, .sram_write, .data_from_sram);

endmodule
