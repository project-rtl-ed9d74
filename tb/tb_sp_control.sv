// Self-checking testbench of sp_control.  The testbench plays the datapath:
// it hands the state machine a new instruction word whenever IR_in is
// asserted and compares, cycle by cycle, every control output with the
// sequence expected for that instruction (four fetch steps, then the
// execute steps listed here).  All sixteen opcodes are run with random X,
// Y and S, bne both taken and not taken.  It also checks the idle state
// while m68k_master is high (PC cleared, nothing else asserted), the return
// to idle when m68k_master rises mid-instruction, the halt state, and the
// instruction lengths of 5, 6 and 7 cycles.
module tb_sp_control;
  import sp_pkg::*;
  logic clk = 0, rst = 0, m68k_master = 1, s = 0, halted;
  instr_t ir, next_ir;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  sp_control dut (.clk, .rst, .m68k_master, .ir, .s, .ctrl, .halted);

  always #5 clk = ~clk;
  initial #1 rst = 1;  // a rising edge for the asynchronous reset

  // IR loads when IR_in is asserted, like the datapath's IR
  always_ff @(posedge clk) if (ctrl.ir_in) ir <= next_ir;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t base();
    ctrl_t c = '0;
    c.pc_r0 = 1'b1;
    return c;
  endfunction

  // Expected control outputs of one instruction, fetch included
  function automatic void expected(input instr_t i, input logic sv, output ctrl_t q[$]);
    ctrl_t c;
    q = {};
    c = base(); c.read = 1; c.out_en[SRC_SRAM] = 1;            q.push_back(c); // T1
    c = base(); c.out_en[SRC_SRAM] = 1; c.ir_in = 1;           q.push_back(c); // T2
    c = base(); c.out_en[SRC_PC] = 1; c.inc = 1;               q.push_back(c); // T3
    c = base(); c.out_en[SRC_Z] = 1; c.pc_in = 1;              q.push_back(c); // T4
    c = base();
    case (i.op)
      OP_MOVI:  begin c.out_en[SRC_IR] = 1; c.r_in[i.x] = 1; q.push_back(c); end
      OP_MOVE:  begin c.out_en[3 + i.y] = 1; c.r_in[i.x] = 1; q.push_back(c); end
      OP_LOAD:  begin
        c.pc_r0 = 0; c.read = 1; q.push_back(c);
        c = base(); c.out_en[SRC_SRAM] = 1; c.r_in[i.x] = 1; q.push_back(c);
      end
      OP_STORE: begin
        c.out_en[3 + i.y] = 1; c.pc_r0 = 0; c.write = 1; q.push_back(c);
        c = base(); c.out_en[3 + i.y] = 1; c.pc_r0 = 0; q.push_back(c);
      end
      OP_ADD, OP_SUB: begin
        c.out_en[3 + i.x] = 1; c.temp_in = 1; q.push_back(c);
        c = base(); c.out_en[3 + i.y] = 1;
        if (i.op == OP_ADD) c.add = 1; else c.sub = 1;
        q.push_back(c);
        c = base(); c.out_en[SRC_Z] = 1; c.r_in[i.x] = 1; q.push_back(c);
      end
      OP_BNE:   begin if (!sv) begin c.out_en[SRC_IR] = 1; c.pc_in = 1; end q.push_back(c); end
      OP_MVIN:  begin c.out_en[SRC_PORTIN] = 1; c.r_in[i.x] = 1; q.push_back(c); end
      OP_MVOUT: begin c.out_en[3 + i.y] = 1; c.portout_in = 1; q.push_back(c); end
      OP_MVCNT: begin c.out_en[SRC_COUNT] = 1; c.r_in[i.x] = 1; q.push_back(c); end
      OP_MVCFG: begin c.out_en[3 + i.y] = 1; c.config_in = 1; q.push_back(c); end
      default:  q.push_back(c);   // halt, unused opcodes: one empty step
    endcase
  endfunction

  task automatic run_instr(input instr_t i, input logic sv);
    ctrl_t q[$];
    int exp_len;
    expected(i, sv, q);
    exp_len = (i.op inside {OP_LOAD, OP_STORE}) ? 6 : (i.op inside {OP_ADD, OP_SUB}) ? 7 : 5;
    checks++;
    if (q.size() != exp_len) begin failures++; $display("FAIL length table"); end
    next_ir = i;
    s = sv;
    foreach (q[k]) begin
      @(negedge clk);
      checks++;
      if (ctrl !== q[k]) begin
        failures++;
        $display("FAIL op=%s step %0d ctrl=%h exp %h", i.op.name(), k, ctrl, q[k]);
      end
    end
  endtask

  task automatic check_idle(input string what);
    ctrl_t c = base();
    c.pc_clr = 1;
    checks++;
    if (ctrl !== c || halted) begin failures++; $display("FAIL idle (%s) ctrl=%h", what, ctrl); end
  endtask

  initial begin
    instr_t i;
    ir = '0;
    #12 rst = 0;
    repeat (3) @(negedge clk);
    check_idle("m68k_master high");
    m68k_master = 0;
    for (int rep = 0; rep < 40; rep++) begin
      for (int op = 0; op < 16; op++) begin
        if (op == 6) continue;  // halt tested below
        i = instr_t'({4'(op), 2'($urandom), 2'($urandom), 8'($urandom)});
        run_instr(i, (op == 7) ? 1'(rep % 2) : 1'($urandom));
      end
    end
    // halt: no fetch any more
    i = instr_t'({OP_HALT, 2'd1, 2'd2, 8'h33});
    run_instr(i, 0);
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (ctrl !== base() || !halted) begin failures++; $display("FAIL activity while halted"); end
    end
    // back to the 68000, then run again from idle
    m68k_master = 1;
    @(negedge clk);
    check_idle("after halt");
    m68k_master = 0;
    run_instr(instr_t'({OP_MOVI, 2'd2, 2'd0, 8'h12}), 0);
    // m68k_master rising in the middle of an add
    next_ir = instr_t'({OP_ADD, 2'd1, 2'd3, 8'h0});
    repeat (5) @(negedge clk);
    m68k_master = 1;
    @(negedge clk);
    check_idle("abort");
    m68k_master = 0;
    run_instr(instr_t'({OP_SUB, 2'd3, 2'd1, 8'h0}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
