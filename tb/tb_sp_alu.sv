// Self-checking testbench of sp_alu: random operands for each of the three
// functions and for no function, compared with results computed here,
// including the zero flag and wrap-around cases.
module tb_sp_alu;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, result;
  logic inc, add, sub, zero;
  int checks = 0, failures = 0;

  sp_alu dut (.a, .b, .inc, .add, .sub, .result, .zero);

  task automatic check(input logic [W-1:0] exp, input string what);
    #1;
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h/%b exp %h", what, a, b, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = W'($urandom); b = W'($urandom);
      if (i == 0) begin a = 16'h1234; b = 16'h1234; end
      if (i == 1) begin a = 16'h0000; b = 16'hFFFF; end
      {inc, add, sub} = 3'b100; check(W'(b + 1), "inc");
      {inc, add, sub} = 3'b010; check(W'(a + b), "add");
      {inc, add, sub} = 3'b001; check(W'(a - b), "sub");
      {inc, add, sub} = 3'b000; check('0, "none");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
