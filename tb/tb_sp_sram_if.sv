// Self-checking testbench of sp_sram_if: random PC, R0, bus and strobes;
// one clock later the SRAM outputs must show the registered values, with
// fetch addresses in words 0..255 and data addresses at 256 + R0.
module tb_sp_sram_if;
  import sp_pkg::*;
  logic clk = 0, rst = 0;
  logic [WORD_W-1:0] pc, r0, bus, sram_data;
  logic pc_r0, read, write, sram_read, sram_write;
  logic [ADDR_W-1:0] sram_addr, exp_addr;
  logic [WORD_W-1:0] exp_data;
  logic exp_rd, exp_wr;
  int checks = 0, failures = 0;

  sp_sram_if dut (.clk, .rst, .pc, .r0, .bus, .pc_r0, .read, .write,
                  .sram_addr, .sram_data, .sram_read, .sram_write);

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = '0; r0 = '0; bus = '0; pc_r0 = 1; read = 0; write = 0;
    #12;
    checks++;
    if (sram_addr !== '0 || sram_read || sram_write) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      pc = WORD_W'($urandom); r0 = WORD_W'($urandom); bus = WORD_W'($urandom);
      pc_r0 = 1'($urandom); read = 1'($urandom); write = !read && 1'($urandom);
      exp_addr = pc_r0 ? ADDR_W'(pc % 256) : ADDR_W'(256 + (r0 % 256));
      exp_data = bus; exp_rd = read; exp_wr = write;
      // outputs must not follow the inputs before the clock edge
      #1;
      checks++;
      if (i > 0 && sram_data === bus && sram_addr === exp_addr && bus != 0) begin
        failures++; $display("FAIL outputs not registered");
      end
      @(posedge clk); #1;
      checks++;
      if (sram_addr !== exp_addr || sram_data !== exp_data ||
          sram_read !== exp_rd || sram_write !== exp_wr) begin
        failures++;
        $display("FAIL cycle %0d addr=%h exp %h data=%h exp %h", i, sram_addr, exp_addr, sram_data, exp_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
