// Top level: the simple processor and the SRAM controller on one chip.
//
// The processor executes a program held in an external 512 x 16 SRAM.  A
// 68000 board computer shares that SRAM: with m68k_master high the 68000
// may read and write it (load a program into words 0..255, read results
// from words 256..511) and the processor is idle; with m68k_master low the
// 68000 is locked out and the processor runs from address 0.  The SRAM
// and the 68000 are outside this design; their signals are ports:
//   m_*     68000 side: word address, write data, read and write strobes,
//           read data (valid in the same cycle while m_read is high)
//   sram_*  SRAM pins: address, data out / output enable / data in (the
//           bidirectional data pins split in three), and active-low chip
//           enable, output enable and write enable.  The SRAM must return
//           read data combinationally from address and oe_n, within one
//           processor clock, and take write data on the rising edge of
//           we_n.
// port_in/port_out are the processor's 8-bit I/O pins (switches, LEDs),
// cnt_clk clocks its counter.  The partitioning follows the original
// design; the pin list of the SRAM and the 68000 side is this design's.
module sp_top
  import sp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cnt_clk,
  input  logic              m68k_master,
  input  logic [PORT_W-1:0] port_in,
  output logic [PORT_W-1:0] port_out,
  output logic              halted,
  // 68000 side
  input  logic [ADDR_W-1:0] m_addr,
  input  logic [WORD_W-1:0] m_wdata,
  input  logic              m_read,
  input  logic              m_write,
  output logic [WORD_W-1:0] m_rdata,
  // SRAM pins
  output logic [ADDR_W-1:0] sram_a,
  output logic [WORD_W-1:0] sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [WORD_W-1:0] sram_dq_i,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n
);

  logic [ADDR_W-1:0] p_addr;
  logic [WORD_W-1:0] p_wdata, p_rdata;
  logic              p_read, p_write;

  sp_processor u_proc (
    .clk, .rst, .cnt_clk, .m68k_master, .port_in, .port_out,
    .sram_addr(p_addr), .sram_data(p_wdata), .sram_read(p_read),
    .sram_write(p_write), .data_from_sram(p_rdata), .halted);

  sp_sram_ctrl #(.AW(ADDR_W), .W(WORD_W)) u_sram_ctrl (
    .m68k_master,
    .p_addr, .p_wdata, .p_read, .p_write, .p_rdata,
    .m_addr, .m_wdata, .m_read, .m_write, .m_rdata,
    .sram_a, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ce_n, .sram_oe_n, .sram_we_n);

endmodule
