// Self-checking testbench of sp_bus_mux: every single out signal, no out
// signal, and random source values; checks the bus value and the encoder's
// binary select.
module tb_sp_bus_mux;
  localparam int unsigned N = 10, W = 16;
  logic [N-1:0] out_en;
  logic [N-1:0][W-1:0] src;
  logic [W-1:0] bus;
  logic [$clog2(N)-1:0] sel;
  logic sel_valid;
  int checks = 0, failures = 0;

  sp_bus_mux dut (.out_en, .src, .bus, .sel, .sel_valid);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int i = 0; i < N; i++) src[i] = W'($urandom);
      for (int k = -1; k < int'(N); k++) begin
        out_en = '0;
        if (k >= 0) out_en[k] = 1'b1;
        #1;
        checks++;
        if (k < 0) begin
          if (bus !== '0 || sel_valid !== 1'b0) begin failures++; $display("FAIL idle bus=%h", bus); end
        end else if (bus !== src[k] || sel !== ($clog2(N))'(k) || !sel_valid) begin
          failures++;
          $display("FAIL src %0d bus=%h exp %h sel=%0d", k, bus, src[k], sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
