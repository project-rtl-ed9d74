// Behavioural model of an asynchronous static RAM (not synthesizable
// intent; testbench use only).
//
// DEPTH words of W bits.  Read: while ce_n and oe_n are low, dq_o shows
// the addressed word combinationally (zero otherwise).  Write: the word on
// dq_i is stored at address a on the rising edge of we_n while ce_n is low,
// as on a write-enable-controlled asynchronous SRAM cycle.  The contents
// start at zero.
module sram_model #(
  parameter int unsigned AW    = 9,
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic [AW-1:0] a,
  input  logic [W-1:0]  dq_i,
  output logic [W-1:0]  dq_o,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] a_q;
  logic          ce_q;

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  assign dq_o = (!ce_n && !oe_n) ? mem[a] : '0;

  // Address and chip enable as they were while we_n was low
  always @(negedge we_n or a or ce_n) if (!we_n) begin
    a_q  = a;
    ce_q = !ce_n;
  end

  always @(posedge we_n) if (ce_q) mem[a_q] <= dq_i;

endmodule
