// MUX-Encoder: puts one source onto the processor bus.
//
// The control circuit asserts at most one "out" signal (PCout, IRout, Zout,
// R0out..R3out, PortINout, Countout, FromSRAMout).  The encoder turns that
// one-hot vector into a binary select and the multiplexer passes the chosen
// source to the bus.  With no out signal asserted the bus carries zero.  If
// several were asserted, which the control circuit never does, the lowest
// numbered source wins.  The encoder-plus-multiplexer structure follows the
// original design; the source numbering (sp_pkg::src_e) and the idle value
// are this design's choice.  Purely combinational.
module sp_bus_mux #(
  parameter int unsigned N = 10,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0]        out_en,  // one-hot out signals
  input  logic [N-1:0][W-1:0] src,     // source values, index = src_e
  output logic [W-1:0]        bus,
  output logic [$clog2(N)-1:0] sel,    // encoder output
  output logic                sel_valid
);

  // Encoder
  always_comb begin
    sel       = '0;
    sel_valid = 1'b0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (out_en[i]) begin
        sel       = ($clog2(N))'(i);
        sel_valid = 1'b1;
      end
    end
  end

  // Multiplexer
  always_comb begin
    bus = '0;
    if (sel_valid) bus = src[sel];
  end

endmodule
