// Z and S registers: the ALU result register and the zero status bit.
//
// Z loads the ALU result on every cycle in which the ALU is told to
// operate (inc, add or sub); the bus reads it back through Zout.  S loads
// the ALU zero flag only on a subtraction, so it tells whether the last
// subtraction gave zero; the bne instruction tests it.  The original design
// shows neither register with a load enable of its own, so loading them
// from the ALU function signals is this design's choice.  Both clear on
// the asynchronous active-high reset.  Timing: z and s change on the clock
// edge that ends the ALU cycle.
module sp_zs_regs #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] alu_result,
  input  logic         alu_zero,
  input  logic         inc,
  input  logic         add,
  input  logic         sub,
  output logic [W-1:0] z,
  output logic         s
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      z <= '0;
      s <= 1'b0;
    end else begin
      if (inc || add || sub) z <= alu_result;
      if (sub)               s <= alu_zero;
    end
  end

endmodule
