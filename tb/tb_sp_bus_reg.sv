// Self-checking testbench of sp_bus_reg: random data and load enables
// against a reference copy kept here; checks reset to zero and that the
// register holds while its enable is low.
module tb_sp_bus_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst = 0, en;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  sp_bus_reg dut (.clk, .rst, .en, .d, .q);

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
    en = 0; d = '1;
    #12;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    ref_q = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom % 3) == 0;
      d  = W'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%h exp %h", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
