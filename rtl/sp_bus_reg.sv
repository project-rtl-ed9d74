// Bus register: a W-bit register that loads its input when its enable is high.
//
// This is the register of the single-bus datapath.  R0..R3, PC, IR, Temp,
// PortOUT and Config load the bus on the rising clock edge when their
// "_in" enable is asserted and hold their value otherwise.  PortIN is the
// same register with the enable tied high, sampling the input pins every
// cycle.  All registers share one clock and one global reset, as in the
// original design; the reset being asynchronous, active high and clearing
// the register to zero is this design's choice (PC must start at zero).
//
// Timing: q changes one clock edge after en and d are presented.
module sp_bus_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,   // asynchronous, active high
  input  logic         en,    // load enable (<name>_in)
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
