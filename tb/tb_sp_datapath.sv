// Self-checking testbench of sp_datapath, driven directly with control
// words.  The SRAM write-data register copies the bus every cycle, so it
// serves to observe the bus one clock later.  A reference model here keeps
// R0..R3, PC, IR, Temp, Z and S; random cycles pick one bus source
// (registers, PC, Z, the IR's DATA field or a random SRAM word), any set
// of destination registers and an ALU function, and the bus, S, IR and
// SRAM address/strobes are compared with the model.  Directed parts check
// PortIN, PortOUT, Config and the counter, and the PC clear.
module tb_sp_datapath;
  import sp_pkg::*;
  logic clk = 0, cnt_clk = 0, rst = 0;
  ctrl_t ctrl;
  instr_t ir;
  logic s;
  logic [PORT_W-1:0] port_in, port_out;
  logic [ADDR_W-1:0] sram_addr;
  logic [WORD_W-1:0] sram_data, data_from_sram;
  logic sram_read, sram_write;
  int checks = 0, failures = 0;

  // reference model
  logic [WORD_W-1:0] m_r [4];
  logic [WORD_W-1:0] m_pc, m_ir, m_temp, m_z, m_bus;
  logic m_s;

  sp_datapath dut (.clk, .rst, .cnt_clk, .ctrl, .ir, .s, .port_in, .port_out,
                   .sram_addr, .sram_data, .sram_read, .sram_write, .data_from_sram);

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset
  always #13 cnt_clk = ~cnt_clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // apply one control word for one cycle, return the bus seen afterwards
  task automatic step(input ctrl_t c, output logic [WORD_W-1:0] seen);
    @(negedge clk);
    ctrl = c;
    @(posedge clk);
    #1;
    seen = sram_data;
    ctrl = '0;
    ctrl.pc_r0 = 1;
  endtask

  function automatic ctrl_t idle();
    ctrl_t c = '0;
    c.pc_r0 = 1;
    return c;
  endfunction

  initial begin
    ctrl_t c;
    logic [WORD_W-1:0] seen, v, cnt1, cnt2;
    int src;
    ctrl = idle(); port_in = '0; data_from_sram = '0;
    #12 rst = 0;
    foreach (m_r[k]) m_r[k] = '0;
    m_pc = '0; m_ir = '0; m_temp = '0; m_z = '0; m_s = 0;

    // ---- random transfers against the model ----
    for (int n = 0; n < 3000; n++) begin
      c = idle();
      data_from_sram = WORD_W'($urandom);
      src = $urandom % 8;      // 0 PC, 1 IR, 2 Z, 3..6 R0..R3, 7 SRAM
      c.out_en[(src == 7) ? SRC_SRAM : src] = 1;
      case (src)
        0: m_bus = m_pc;
        1: m_bus = {8'h00, m_ir[7:0]};
        2: m_bus = m_z;
        7: m_bus = data_from_sram;
        default: m_bus = m_r[src - 3];
      endcase
      c.r_in    = 4'($urandom) & 4'($urandom);
      c.pc_in   = ($urandom % 4) == 0;
      c.ir_in   = ($urandom % 4) == 0;
      c.temp_in = ($urandom % 3) == 0;
      c.pc_r0   = 1'($urandom);
      c.read    = 1'($urandom);
      c.write   = !c.read && 1'($urandom);
      case ($urandom % 4)
        0: c.inc = 1;
        1: c.add = 1;
        2: c.sub = 1;
        default: ;
      endcase
      begin
        logic [ADDR_W-1:0] exp_addr;
        exp_addr = c.pc_r0 ? {1'b0, m_pc[7:0]} : {1'b1, m_r[0][7:0]};
        step(c, seen);
        chk(seen == m_bus, $sformatf("bus src %0d got %h exp %h", src, seen, m_bus));
        chk(sram_addr == exp_addr && sram_read == c.read && sram_write == c.write, "sram address/strobes");
      end
      // model update
      if (c.inc) m_z = m_bus + 1;
      if (c.add) m_z = m_temp + m_bus;
      if (c.sub) begin m_z = m_temp - m_bus; m_s = (m_z == 0); end
      for (int k = 0; k < 4; k++) if (c.r_in[k]) m_r[k] = m_bus;
      if (c.pc_in)   m_pc = m_bus;
      if (c.ir_in)   m_ir = m_bus;
      if (c.temp_in) m_temp = m_bus;
      #1;
      chk(s == m_s, "S flag");
      chk(ir == instr_t'(m_ir), "IR");
    end

    // ---- subtraction giving zero sets S ----
    c = idle(); c.out_en[SRC_R2] = 1; c.temp_in = 1; step(c, seen);
    c = idle(); c.out_en[SRC_R2] = 1; c.sub = 1;     step(c, seen);
    chk(s == 1, "S set on equal subtraction");
    c = idle(); c.out_en[SRC_Z] = 1; step(c, seen);
    chk(seen == 0, "Z zero after equal subtraction");

    // ---- PortIN and PortOUT ----
    port_in = 8'hA5;
    @(negedge clk);
    c = idle(); c.out_en[SRC_PORTIN] = 1; c.r_in[3] = 1; step(c, seen);
    chk(seen == 16'h00A5, "PortIN on bus");
    c = idle(); c.out_en[SRC_R3] = 1; c.portout_in = 1; step(c, seen);
    chk(port_out == 8'hA5, "PortOUT loads");
    c = idle(); c.out_en[SRC_R1] = 1; step(c, seen);
    chk(port_out == 8'hA5, "PortOUT holds");

    // ---- Config and Count ----
    c = idle(); c.out_en[SRC_COUNT] = 1; step(c, cnt1);
    chk(cnt1 == 0, "Count idle at zero");
    data_from_sram = 16'h0001;
    c = idle(); c.out_en[SRC_SRAM] = 1; c.config_in = 1; step(c, seen);
    repeat (200) @(posedge clk);
    c = idle(); c.out_en[SRC_COUNT] = 1; step(c, cnt1);
    chk(cnt1 > 60 && cnt1 < 90, $sformatf("Count runs (%0d)", cnt1));
    data_from_sram = 16'h00FE;    // bit 0 clear: stop
    c = idle(); c.out_en[SRC_SRAM] = 1; c.config_in = 1; step(c, seen);
    repeat (20) @(posedge clk);
    c = idle(); c.out_en[SRC_COUNT] = 1; step(c, cnt1);
    repeat (100) @(posedge clk);
    c = idle(); c.out_en[SRC_COUNT] = 1; step(c, cnt2);
    chk(cnt1 == cnt2 && cnt1 != 0, "Count stops when Config[0] is clear");

    // ---- PC clear ----
    c = idle(); c.pc_clr = 1; step(c, seen);
    c = idle(); c.out_en[SRC_PC] = 1; step(c, v);
    chk(v == 0, "PC cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
