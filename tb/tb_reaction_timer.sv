// Workload testbench: a reaction timer in machine code on sp_top.
//
// The 68000 side loads the program below into the SRAM and hands the SRAM
// to the processor.  The program waits for PortIN = 1 (start switch),
// starts the counter, lights all PortOUT LEDs, reads the counter, waits for
// PortIN = 3 (start switch plus reaction button), reads the counter again,
// and shows the difference - the reaction time in cnt_clk ticks - on
// PortOUT (low byte) and in data word 0 (full 16 bits), then halts.
// cnt_clk runs at one tenth of the processor clock.  The testbench presses
// the button a chosen number of counter ticks after the LEDs light and
// checks the measured time against that number, allowing four ticks for
// the polling loop and the clock-domain synchroniser.  Three trials, one
// over 255 ticks, are run, each restarted through m68k_master.
module tb_reaction_timer;
  import sp_pkg::*;
  import sp_asm_pkg::*;
  logic clk = 0, cnt_clk = 0, rst = 0, m68k_master = 1, halted;
  logic [PORT_W-1:0] port_in = '0, port_out;
  logic [ADDR_W-1:0] m_addr = '0, sram_a;
  logic [WORD_W-1:0] m_wdata = '0, m_rdata, sram_dq_o, sram_dq_i;
  logic m_read = 0, m_write = 0, sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int checks = 0, failures = 0;

  sp_top dut (.*);

  sram_model #(.AW(ADDR_W), .W(WORD_W), .DEPTH(512)) u_sram (
    .a(sram_a), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset
  always #50 cnt_clk = ~cnt_clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic m68k_write(input int a, input logic [15:0] d);
    @(negedge clk);
    m_addr = ADDR_W'(a); m_wdata = d; m_write = 1;
    @(negedge clk);
    m_write = 0;
    @(negedge clk);
  endtask

  task automatic m68k_read(input int a, output logic [15:0] d);
    @(negedge clk);
    m_addr = ADDR_W'(a); m_read = 1;
    #2 d = m_rdata;
    @(negedge clk);
    m_read = 0;
  endtask

  logic [15:0] prog [$];

  initial begin
    logic [15:0] d;
    int ticks [3] = '{37, 120, 700};
    prog = {
      asm(OP_MOVI, 1, 0, 1),     // 0  R1 = 1
      asm(OP_MVIN, 2),           // 1  wait: R2 = PortIN
      asm(OP_SUB,  2, 1),        // 2  R2 - 1
      asm(OP_BNE,  0, 0, 1),     // 3  until PortIN == 1
      asm(OP_MOVI, 2, 0, 1),     // 4
      asm(OP_MVCFG, 0, 2),       // 5  counter on
      asm(OP_MOVI, 2, 0, 8'hFF), // 6
      asm(OP_MVOUT, 0, 2),       // 7  LEDs on
      asm(OP_MVCNT, 3),          // 8  R3 = start time
      asm(OP_MOVI, 1, 0, 3),     // 9  R1 = 3
      asm(OP_MVIN, 2),           // 10 wait: R2 = PortIN
      asm(OP_SUB,  2, 1),        // 11
      asm(OP_BNE,  0, 0, 10),    // 12 until PortIN == 3
      asm(OP_MVCNT, 2),          // 13 R2 = stop time
      asm(OP_SUB,  2, 3),        // 14 R2 = reaction time
      asm(OP_MVOUT, 0, 2),       // 15 show low byte
      asm(OP_MOVI, 0, 0, 0),     // 16 R0 = 0
      asm(OP_STORE, 0, 2),       // 17 data[0] = reaction time
      asm(OP_MOVI, 1, 0, 0),     // 18
      asm(OP_MVCFG, 0, 1),       // 19 counter off
      asm(OP_HALT)               // 20
    };
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (prog[k]) m68k_write(k, prog[k]);
    foreach (ticks[t]) begin
      port_in = 8'h00;
      m68k_master = 0;
      repeat (100) @(negedge clk);
      checks++;
      if (port_out == 8'hFF && t == 0) begin failures++; $display("FAIL LEDs lit before start"); end
      port_in = 8'h01;
      wait (port_out == 8'hFF);
      repeat (ticks[t]) @(posedge cnt_clk);
      port_in = 8'h03;
      wait (halted);
      repeat (5) @(negedge clk);
      m68k_master = 1;
      m68k_read(256, d);
      checks++;
      if (int'(d) < ticks[t] - 4 || int'(d) > ticks[t] + 4) begin
        failures++; $display("FAIL trial %0d: measured %0d ticks, pressed after %0d", t, d, ticks[t]);
      end
      checks++;
      if (port_out != d[7:0]) begin failures++; $display("FAIL PortOUT %h, time %h", port_out, d); end
      $display("trial %0d: button after %0d ticks, measured %0d", t, ticks[t], d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
