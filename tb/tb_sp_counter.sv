// Self-checking testbench of sp_counter.  The processor clock runs at
// 10 ns, cnt_clk at 37 ns.  Checks: zero after reset; the value seen by the
// processor never jumps by more than one step (no torn reads across the
// clock domains); the count stops while disabled; the number of steps
// matches the number of cnt_clk edges during which the counter was enabled
// (within the synchroniser delay); and the counter wraps from FFFF to 0.
module tb_sp_counter;
  localparam int unsigned W = 16;
  logic clk = 0, cnt_clk = 0, rst = 0, enable = 0;
  logic [W-1:0] count, prev;
  int checks = 0, failures = 0, edges;
  logic counting = 0;
  int wraps = 0;

  sp_counter dut (.clk, .rst, .cnt_clk, .enable, .count);

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset
  always #18.5 cnt_clk = ~cnt_clk;

  always @(posedge cnt_clk) if (counting) edges++;

  // continuity check in the processor domain
  always @(posedge clk) if (!rst) begin
    checks++;
    if (count != prev && count != W'(prev + 1)) begin
      failures++; $display("FAIL jump %h -> %h", prev, count);
    end
    if (prev == '1 && count == '0) wraps++;
    prev <= count;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_enabled(input int n);
    logic [W-1:0] start;
    logic signed [W-1:0] err;
    start = count;
    edges = 0;
    @(posedge clk); enable = 1; counting = 1;
    repeat (n) @(posedge cnt_clk);
    @(posedge clk); enable = 0; counting = 0;
    repeat (20) @(posedge clk);
    // steps taken against edges seen, modulo 2^W
    err = W'(count - start) - W'(edges);
    checks++;
    if (err < -3 || err > 3) begin
      failures++; $display("FAIL counted %0d steps for %0d enabled edges", W'(count - start), edges);
    end
  endtask

  initial begin
    prev = '0;
    #23 rst = 0;
    repeat (10) @(posedge clk);
    checks++; if (count !== '0) begin failures++; $display("FAIL not zero after reset"); end
    // stays still while disabled
    repeat (50) @(posedge clk);
    checks++; if (count !== '0) begin failures++; $display("FAIL counted while disabled"); end
    run_enabled(100);
    begin
      logic [W-1:0] held;
      held = count;
      repeat (100) @(posedge clk);
      checks++; if (count !== held) begin failures++; $display("FAIL moved after disable"); end
    end
    run_enabled(1000);
    run_enabled(65000);   // passes FFFF -> 0000
    checks++;
    if (wraps != 1) begin failures++; $display("FAIL wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
