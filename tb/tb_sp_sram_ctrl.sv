// Self-checking testbench of sp_sram_ctrl: random traffic on both sides in
// both modes; the owner's address, data and strobes must reach the SRAM
// pins (active low), the other side must be locked out, and read data must
// return only to the owner.
module tb_sp_sram_ctrl;
  localparam int unsigned AW = 9, W = 16;
  logic m68k_master;
  logic [AW-1:0] p_addr, m_addr, sram_a;
  logic [W-1:0] p_wdata, p_rdata, m_wdata, m_rdata, sram_dq_o, sram_dq_i;
  logic p_read, p_write, m_read, m_write, sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  logic rd, wr;
  int checks = 0, failures = 0;

  sp_sram_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      m68k_master = 1'($urandom);
      p_addr = AW'($urandom); m_addr = AW'($urandom);
      p_wdata = W'($urandom); m_wdata = W'($urandom); sram_dq_i = W'($urandom);
      p_read = 1'($urandom); p_write = ($urandom % 3) == 0;
      m_read = 1'($urandom); m_write = ($urandom % 3) == 0;
      #1;
      rd = m68k_master ? m_read : p_read;
      wr = m68k_master ? m_write : p_write;
      checks++;
      if (sram_a !== (m68k_master ? m_addr : p_addr) ||
          sram_dq_o !== (m68k_master ? m_wdata : p_wdata) ||
          sram_ce_n !== !(rd || wr) || sram_we_n !== !wr ||
          sram_oe_n !== !(rd && !wr) || sram_dq_oe !== wr) begin
        failures++;
        $display("FAIL pins mode=%b a=%h ce=%b oe=%b we=%b", m68k_master, sram_a, sram_ce_n, sram_oe_n, sram_we_n);
      end
      checks++;
      if (p_rdata !== (m68k_master ? '0 : sram_dq_i) || m_rdata !== (m68k_master ? sram_dq_i : '0)) begin
        failures++;
        $display("FAIL read data mode=%b", m68k_master);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
