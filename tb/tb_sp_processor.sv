// Self-checking testbench of sp_processor with an asynchronous SRAM model
// on its SRAM interface.  The program, placed in the code half of the
// SRAM, reads N from PortIN, sums N + (N-1) + ... + 1 in a bne loop, stores
// the sum at data word 0 (SRAM word 256), loads data word 1, adds the sum,
// writes the result to PortOUT and to data word 2, and halts.  Several N
// are run, each started by taking m68k_master low after clearing it high.
// Checks: the stored words and PortOUT against values computed here, that
// nothing outside the data words is written, and the exact number of
// cycles from start to halt (1 + 5/6/7 cycles per executed instruction).
module tb_sp_processor;
  import sp_pkg::*;
  import sp_asm_pkg::*;
  logic clk = 0, cnt_clk = 0, rst = 0, m68k_master = 1, halted;
  logic [PORT_W-1:0] port_in = '0, port_out;
  logic [ADDR_W-1:0] sram_addr;
  logic [WORD_W-1:0] sram_data, data_from_sram;
  logic sram_read, sram_write;
  int checks = 0, failures = 0;

  sp_processor dut (.clk, .rst, .cnt_clk, .m68k_master, .port_in, .port_out,
                    .sram_addr, .sram_data, .sram_read, .sram_write,
                    .data_from_sram, .halted);

  sram_model #(.AW(ADDR_W), .W(WORD_W), .DEPTH(512)) u_sram (
    .a(sram_addr), .dq_i(sram_data), .dq_o(data_from_sram),
    .ce_n(!(sram_read || sram_write)), .oe_n(!(sram_read && !sram_write)),
    .we_n(!sram_write));

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset
  always #7 cnt_clk = ~cnt_clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [$];
  int writes_outside = 0;
  always @(posedge clk) if (sram_write && !(sram_addr inside {9'd256, 9'd258})) writes_outside++;

  initial begin
    int n, sum, cyc, exp_cyc, word1;
    prog = {
      asm(OP_MOVI, 0, 0, 0),     // 0  R0 = 0
      asm(OP_MVIN, 1),           // 1  R1 = N
      asm(OP_MOVI, 2, 0, 0),     // 2  R2 = 0
      asm(OP_MOVI, 3, 0, 1),     // 3  R3 = 1
      asm(OP_ADD,  2, 1),        // 4  R2 += R1
      asm(OP_SUB,  1, 3),        // 5  R1 -= 1
      asm(OP_BNE,  0, 0, 4),     // 6  loop while R1 != 0
      asm(OP_STORE, 0, 2),       // 7  data[0] = sum
      asm(OP_MOVI, 0, 0, 1),     // 8  R0 = 1
      asm(OP_LOAD, 1),           // 9  R1 = data[1]
      asm(OP_ADD,  1, 2),        // 10 R1 += sum
      asm(OP_MVOUT, 0, 1),       // 11 PortOUT = R1
      asm(OP_MOVE, 3, 1),        // 12 R3 = R1
      asm(OP_MOVI, 0, 0, 2),     // 13 R0 = 2
      asm(OP_STORE, 0, 3),       // 14 data[2] = R3
      asm(OP_HALT),              // 15
      asm(OP_MVOUT, 0, 0)        // 16 never reached
    };
    foreach (prog[k]) u_sram.mem[k] = prog[k];
    #12 rst = 0;
    for (int run = 0; run < 4; run++) begin
      n = (run == 0) ? 1 : (run == 1) ? 5 : (run == 2) ? 20 : 255;
      word1 = $urandom % 65536;
      u_sram.mem[257] = 16'(word1);
      u_sram.mem[256] = 16'hDEAD;
      u_sram.mem[258] = 16'hDEAD;
      port_in = 8'(n);
      sum = n * (n + 1) / 2;
      exp_cyc = 1;
      for (int k = 0; k <= 15; k++) begin
        if (k >= 4 && k <= 6) exp_cyc += n * cycles(prog[k][15:12]);
        else                  exp_cyc += cycles(prog[k][15:12]);
      end
      m68k_master = 1;
      repeat (3) @(negedge clk);
      m68k_master = 0;
      cyc = 0;
      while (!halted) begin @(negedge clk); cyc++; end
      repeat (10) @(negedge clk);
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL N=%0d cycles %0d exp %0d", n, cyc, exp_cyc); end
      checks++;
      if (u_sram.mem[256] !== 16'(sum)) begin failures++; $display("FAIL N=%0d sum %h exp %h", n, u_sram.mem[256], 16'(sum)); end
      checks++;
      if (u_sram.mem[258] !== 16'(sum + word1)) begin failures++; $display("FAIL N=%0d data[2] %h", n, u_sram.mem[258]); end
      checks++;
      if (port_out !== 8'(sum + word1)) begin failures++; $display("FAIL N=%0d PortOUT %h", n, port_out); end
      checks++;
      if (writes_outside != 0) begin failures++; $display("FAIL write outside data words"); end
      checks++;
      foreach (prog[k]) if (u_sram.mem[k] !== prog[k]) begin failures++; $display("FAIL code overwritten"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
