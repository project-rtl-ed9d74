// SRAM controller: shares the board SRAM between the 68000 and the processor.
//
// The mode input m68k_master decides who owns the SRAM.  While it is high
// the 68000 owns it: its address, write data and read/write strobes reach
// the memory, so a program can be loaded into the code half and results
// read back from the data half, and the processor's strobes are ignored.
// While it is low the processor owns it and the 68000's strobes are
// ignored (its read data is then zero).  The processor side is already
// registered in its SRAM interface; this block only selects and converts
// to the memory's active-low controls:
//   ce_n = no strobe active, oe_n = no read (or a write), we_n = no write,
//   dq_oe drives the data pins during a write.
// Two modes with the 68000 disabled while the processor runs follow the
// original design.  The polarity (high = 68000) follows the signal's name
// and the instruction that the processor waits for it to go low; the pin
// set of the memory and the combinational selection are this design's
// choice.  Read data from the memory is returned to the current owner in
// the same cycle.
module sp_sram_ctrl #(
  parameter int unsigned AW = 9,
  parameter int unsigned W  = 16
) (
  input  logic          m68k_master,   // 1: 68000 owns SRAM, 0: processor
  // processor side
  input  logic [AW-1:0] p_addr,
  input  logic [W-1:0]  p_wdata,
  input  logic          p_read,
  input  logic          p_write,
  output logic [W-1:0]  p_rdata,
  // 68000 side
  input  logic [AW-1:0] m_addr,
  input  logic [W-1:0]  m_wdata,
  input  logic          m_read,
  input  logic          m_write,
  output logic [W-1:0]  m_rdata,
  // SRAM pins
  output logic [AW-1:0] sram_a,
  output logic [W-1:0]  sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [W-1:0]  sram_dq_i,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n
);

  logic rd, wr;

  always_comb begin
    if (m68k_master) begin
      sram_a    = m_addr;
      sram_dq_o = m_wdata;
      rd        = m_read;
      wr        = m_write;
    end else begin
      sram_a    = p_addr;
      sram_dq_o = p_wdata;
      rd        = p_read;
      wr        = p_write;
    end
    sram_ce_n  = !(rd || wr);
    sram_oe_n  = !(rd && !wr);
    sram_we_n  = !wr;
    sram_dq_oe = wr;
    p_rdata    = m68k_master ? '0 : sram_dq_i;
    m_rdata    = m68k_master ? sram_dq_i : '0;
  end

endmodule
