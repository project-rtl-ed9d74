// Testbench helpers: encode instructions of the simple processor and give
// the number of clock cycles each takes (fetch included).
package sp_asm_pkg;
  import sp_pkg::*;

  // OP-CODE [15:12] | X [11:10] | Y [9:8] | DATA [7:0]
  function automatic logic [15:0] asm(opcode_e op, int x = 0, int y = 0, int data = 0);
    return {op, 2'(x), 2'(y), 8'(data)};
  endfunction

  // cycles from the first fetch step to the first fetch step of the next
  function automatic int cycles(logic [3:0] op);
    case (op)
      OP_LOAD, OP_STORE: return 6;
      OP_ADD, OP_SUB:    return 7;
      default:           return 5;
    endcase
  endfunction
endpackage
