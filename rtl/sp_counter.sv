// Count: a 16-bit event counter clocked by the external clock cnt_clk.
//
// The counter advances by one on every rising edge of cnt_clk while its
// enable (bit 0 of the Config register) is set, and holds otherwise; it
// wraps from all ones to zero.  Programs read it over the bus (mvcnt) to
// time events, for instance a reaction time.
//
// Counter width, the external clock and the single enable bit follow the
// original design.  How the two clock domains meet is this design's own:
//   * enable is passed into the cnt_clk domain through two flip-flops;
//   * the count is kept in binary and as a Gray-coded copy in the cnt_clk
//     domain; the Gray copy, which changes one bit per step, is passed to
//     the processor clock domain through two flip-flops and converted back
//     to binary there, so a read never sees a torn value.
// The value seen by the processor therefore trails the counter by two to
// three processor clocks, and the counter starts or stops two to three
// cnt_clk edges after the enable changes.  Both domains clear on the
// asynchronous active-high reset.
module sp_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,      // processor clock
  input  logic         rst,      // asynchronous, active high
  input  logic         cnt_clk,  // external counting clock
  input  logic         enable,   // Config[0], processor clock domain
  output logic [W-1:0] count     // counter value, processor clock domain
);

  // ---- cnt_clk domain ----
  logic [1:0]   en_sync;
  logic [W-1:0] bin_cnt, gray_cnt;

  always_ff @(posedge cnt_clk or posedge rst) begin
    if (rst) begin
      en_sync  <= '0;
      bin_cnt  <= '0;
      gray_cnt <= '0;
    end else begin
      en_sync <= {en_sync[0], enable};
      if (en_sync[1]) begin
        bin_cnt  <= bin_cnt + W'(1);
        gray_cnt <= (bin_cnt + W'(1)) ^ ((bin_cnt + W'(1)) >> 1);
      end
    end
  end

  // ---- processor clock domain ----
  logic [W-1:0] gray_s1, gray_s2;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      gray_s1 <= '0;
      gray_s2 <= '0;
    end else begin
      gray_s1 <= gray_cnt;
      gray_s2 <= gray_s1;
    end
  end

  // Gray to binary: each bit is the XOR of all Gray bits at or above it
  always_comb begin
    count[W-1] = gray_s2[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) count[i] = count[i+1] ^ gray_s2[i];
  end

endmodule
