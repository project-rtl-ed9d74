// ALU of the simple processor: increment, add and subtract.
//
// Operand a is the Temp register, operand b is the bus.  One of three
// one-hot function inputs selects the operation:
//   inc : result = b + 1        (used to step the PC during fetch)
//   add : result = a + b
//   sub : result = a - b
// With no function asserted the result is zero.  zero flags a result of
// zero; the Z/S register block keeps it only for subtractions.  The three
// operations and the Temp/bus operand arrangement follow the original
// design; the operand order of the subtraction (Temp minus bus) follows
// from its Rx <- Rx - Ry instruction with Rx parked in Temp.  Purely
// combinational, results wrap modulo 2^W.
module sp_alu #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,       // Temp
  input  logic [W-1:0] b,       // bus
  input  logic         inc,
  input  logic         add,
  input  logic         sub,
  output logic [W-1:0] result,
  output logic         zero
);

  always_comb begin
    if (inc)      result = b + W'(1);
    else if (add) result = a + b;
    else if (sub) result = a - b;
    else          result = '0;
    zero = (result == '0);
  end

endmodule
