// End-to-end testbench of sp_top at its default parameters, with an
// asynchronous SRAM model on the SRAM pins and the 68000 side driven here.
//
// Flow: with m68k_master high the 68000 side writes a program into SRAM
// words 0..30 and an operand into data word 1 (word 257) and reads it
// back; m68k_master goes low and the processor runs the program, which uses
// every instruction (bne both taken and not taken), an unused opcode, the
// input and output ports and the counter, then halts; m68k_master goes high
// again and the 68000 side reads the results.  The whole run is repeated
// with another PortIN value to show the restart at address 0.  While the
// processor runs, a 68000 write is attempted and must have no effect.
//
// Checks: results in SRAM and on PortOUT against values worked out here;
// the cycle count from start to halt (1 + 5, 6 or 7 cycles per executed
// instruction); that every mechanism happened at least once: each of the
// twelve instructions, bne taken, bne not taken, an unused opcode, the
// halt state, both mode switches, 68000 writes and reads, a locked-out
// 68000 access, and the counter advancing.
module tb_sp_top;
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
  always #10 cnt_clk = ~cnt_clk;   // counter clock: half the processor clock

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- mechanism counters, from the processor's control signals ----
  int n_op [16];
  int n_bne_taken = 0, n_bne_not = 0, n_halt_cycles = 0, n_to_proc = 0, n_to_m68k = 0;
  int n_m_wr = 0, n_m_rd = 0, n_m_locked = 0, n_count_steps = 0;
  logic in_e1 = 0;
  logic prev_master = 1;
  logic [15:0] prev_count = 0;
  always @(posedge clk) begin
    // the step after T4 (Zout, PC_in) is the first execute step
    if (in_e1) begin
      n_op[dut.u_proc.ir.op]++;
      if (dut.u_proc.ir.op == OP_BNE) begin
        if (dut.u_proc.ctrl.pc_in) n_bne_taken++; else n_bne_not++;
      end
    end
    in_e1 <= dut.u_proc.ctrl.pc_in && dut.u_proc.ctrl.out_en[SRC_Z];
    if (halted) n_halt_cycles++;
    if (prev_master && !m68k_master) n_to_proc++;
    if (!prev_master && m68k_master) n_to_m68k++;
    prev_master <= m68k_master;
    if (dut.u_proc.u_dp.count != prev_count) n_count_steps++;
    prev_count <= dut.u_proc.u_dp.count;
  end

  task automatic m68k_write(input int a, input logic [15:0] d);
    @(negedge clk);
    m_addr = ADDR_W'(a); m_wdata = d; m_write = 1;
    @(negedge clk);
    m_write = 0;
    @(negedge clk);
    if (m68k_master) n_m_wr++; else n_m_locked++;
  endtask

  task automatic m68k_read(input int a, output logic [15:0] d);
    @(negedge clk);
    m_addr = ADDR_W'(a); m_read = 1;
    #2 d = m_rdata;
    @(negedge clk);
    m_read = 0;
    n_m_rd++;
  endtask

  logic [15:0] prog [$];
  logic        runs [$];   // which program words execute

  initial begin
    logic [15:0] d;
    int cyc, exp_cyc, el;
    foreach (n_op[k]) n_op[k] = 0;
    prog = {
      asm(OP_MOVI, 0, 0, 0),     // 0  R0 = 0
      asm(OP_MOVI, 1, 0, 7),     // 1  R1 = 7
      asm(OP_MOVI, 2, 0, 3),     // 2  R2 = 3
      asm(OP_ADD,  1, 2),        // 3  R1 = 10
      asm(OP_SUB,  1, 2),        // 4  R1 = 7, S = 0
      asm(OP_BNE,  0, 0, 7),     // 5  taken
      asm(OP_MOVI, 1, 0, 8'hEE), // 6  skipped
      asm(OP_STORE, 0, 1),       // 7  data[0] = 7
      asm(OP_MOVE, 3, 1),        // 8  R3 = 7
      asm(OP_SUB,  3, 1),        // 9  R3 = 0, S = 1
      asm(OP_BNE,  0, 0, 6),     // 10 not taken
      asm(OP_MVIN, 2),           // 11 R2 = PortIN
      asm(OP_MVOUT, 0, 2),       // 12 PortOUT = R2
      asm(OP_MOVI, 0, 0, 1),     // 13 R0 = 1
      asm(OP_LOAD, 3),           // 14 R3 = data[1]
      asm(OP_ADD,  3, 2),        // 15 R3 += PortIN
      asm(OP_MOVI, 0, 0, 2),     // 16 R0 = 2
      asm(OP_STORE, 0, 3),       // 17 data[2] = R3
      asm(OP_MOVI, 1, 0, 1),     // 18 R1 = 1
      asm(OP_MVCFG, 0, 1),       // 19 counter on
      asm(OP_MVCNT, 2),          // 20 R2 = Count
      16'hC000,                  // 21 unused opcode: no effect
      asm(OP_MOVI, 0, 0, 3),     // 22 R0 = 3
      asm(OP_MVCNT, 3),          // 23 R3 = Count
      asm(OP_SUB,  3, 2),        // 24 R3 = elapsed
      asm(OP_STORE, 0, 3),       // 25 data[3] = elapsed
      asm(OP_MOVI, 1, 0, 0),     // 26
      asm(OP_MVCFG, 0, 1),       // 27 counter off
      asm(OP_HALT),              // 28
      asm(OP_MOVI, 1, 0, 8'h99), // 29 never reached
      asm(OP_MVOUT, 0, 1)        // 30 never reached
    };
    runs = {};
    foreach (prog[k]) runs.push_back(!(k == 6 || k >= 29));
    exp_cyc = 1;
    foreach (prog[k]) if (runs[k]) exp_cyc += cycles(prog[k][15:12]);

    repeat (2) @(negedge clk);
    rst = 0;
    // ---- load the program from the 68000 side ----
    foreach (prog[k]) m68k_write(k, prog[k]);
    m68k_write(257, 16'h1234);
    foreach (prog[k]) begin
      m68k_read(k, d);
      chk(d == prog[k], $sformatf("68000 read-back of word %0d: %h", k, d));
    end

    for (int run = 0; run < 2; run++) begin
      port_in = (run == 0) ? 8'h5A : 8'hC3;
      m68k_write(256, 16'hFFFF);
      m68k_write(258, 16'hFFFF);
      m68k_write(259, 16'hFFFF);
      @(negedge clk);
      m68k_master = 0;
      cyc = 0;
      fork
        m68k_write(300, 16'hBEEF);   // locked out while the processor runs
      join_none
      while (!halted) begin @(negedge clk); cyc++; end
      chk(cyc == exp_cyc, $sformatf("cycles to halt %0d exp %0d", cyc, exp_cyc));
      repeat (10) @(negedge clk);
      chk(port_out == port_in, $sformatf("PortOUT %h after halt", port_out));
      m68k_master = 1;
      @(negedge clk);
      m68k_read(256, d); chk(d == 16'h0007, $sformatf("data[0] = %h", d));
      m68k_read(258, d); chk(d == 16'h1234 + 16'(port_in), $sformatf("data[2] = %h", d));
      m68k_read(259, d);
      el = int'(d);
      // mvcnt to mvcnt: 15 processor cycles = 7.5 counter clocks
      chk(el >= 6 && el <= 9, $sformatf("elapsed count %0d", el));
      m68k_read(300, d); chk(d == 16'h0000, "68000 write ignored in processor mode");
      m68k_read(7, d); chk(d == prog[7], "code half not overwritten");
    end

    // ---- every mechanism happened ----
    for (int op = 0; op < 12; op++)
      chk(n_op[op] > 0, $sformatf("opcode %0d executed %0d times", op, n_op[op]));
    chk(n_op[12] > 0, "unused opcode executed");
    chk(n_bne_taken > 0, "bne taken");
    chk(n_bne_not > 0, "bne not taken");
    chk(n_halt_cycles > 0, "halt state");
    chk(n_to_proc == 2 && n_to_m68k == 2, "mode switches");
    chk(n_m_wr > 0 && n_m_rd > 0, "68000 accesses");
    chk(n_m_locked > 0, "locked-out 68000 access");
    chk(n_count_steps > 0, "counter advanced");
    $display("mechanisms: bne taken %0d, not taken %0d, halt cycles %0d, mode switches %0d/%0d, 68000 wr %0d rd %0d locked %0d, count steps %0d",
             n_bne_taken, n_bne_not, n_halt_cycles, n_to_proc, n_to_m68k, n_m_wr, n_m_rd, n_m_locked, n_count_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
