// Self-checking testbench of sp_zs_regs: random ALU results and function
// signals; Z must load on any function, S only on a subtraction, and both
// must hold otherwise.
module tb_sp_zs_regs;
  localparam int unsigned W = 16;
  logic clk = 0, rst = 0;
  logic [W-1:0] alu_result, z, ref_z;
  logic alu_zero, inc, add, sub, s, ref_s;
  int checks = 0, failures = 0;

  sp_zs_regs dut (.clk, .rst, .alu_result, .alu_zero, .inc, .add, .sub, .z, .s);

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
    {inc, add, sub} = 0; alu_result = '1; alu_zero = 0;
    #12 rst = 0;
    ref_z = '0; ref_s = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {inc, add, sub} = 3'b000;
      case ($urandom % 4)
        0: inc = 1;
        1: add = 1;
        2: sub = 1;
        default: ;
      endcase
      alu_result = ($urandom % 4 == 0) ? '0 : W'($urandom);
      alu_zero   = (alu_result == '0);
      @(posedge clk);
      if (inc || add || sub) ref_z = alu_result;
      if (sub)               ref_s = alu_zero;
      #1;
      checks++;
      if (z !== ref_z || s !== ref_s) begin
        failures++;
        $display("FAIL cycle %0d z=%h s=%b exp %h %b", i, z, s, ref_z, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
