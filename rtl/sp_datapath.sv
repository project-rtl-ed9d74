// Datapath of the simple processor: one 16-bit bus and everything on it.
//
// Sources that can drive the bus (through the MUX-Encoder): PC, IR (its
// DATA field, zero-extended), Z, R0..R3, PortIN (zero-extended), Count and
// the word read from the SRAM.  Registers that load from the bus under
// their _in enable: PC, R0..R3, IR, Temp, PortOUT and Config (low 8 bits).
// The ALU takes Temp and the bus; its result goes to Z, and the zero flag
// of a subtraction to S.  PortIN samples the input pins every cycle.
// Count runs on the external cnt_clk while Config bit 0 is set.  The SRAM
// interface registers the SRAM address (PC or R0), the bus as write data,
// and the Read and Write strobes.
//
// The set of registers, their widths and connections follow the original
// design.  IR showing only its DATA field on the bus, and PortIN sampling
// every cycle, are this design's reading.  All registers share the
// processor clock and the asynchronous active-high reset; PC also clears
// when the control circuit asserts pc_clr.  Every control signal takes
// effect at the next rising clock edge.
module sp_datapath
  import sp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              cnt_clk,
  input  ctrl_t             ctrl,
  output instr_t            ir,
  output logic              s,
  input  logic [PORT_W-1:0] port_in,
  output logic [PORT_W-1:0] port_out,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [WORD_W-1:0] sram_data,
  output logic              sram_read,
  output logic              sram_write,
  input  logic [WORD_W-1:0] data_from_sram
);

  logic [WORD_W-1:0] bus;
  logic [WORD_W-1:0] pc, ir_q, temp, z, alu_result, count;
  logic [3:0][WORD_W-1:0] r;
  logic [PORT_W-1:0] port_in_q, cfg;
  logic              alu_zero;
  logic [NUM_SRC-1:0][WORD_W-1:0] src;
  logic [$clog2(NUM_SRC)-1:0] sel;
  logic              sel_valid;

  // ---- registers on the bus ----
  sp_bus_reg #(.W(WORD_W)) u_pc (
    .clk, .rst, .en(ctrl.pc_in || ctrl.pc_clr),
    .d(ctrl.pc_clr ? '0 : bus), .q(pc));

  for (genvar i = 0; i < 4; i++) begin : g_r
    sp_bus_reg #(.W(WORD_W)) u_r (
      .clk, .rst, .en(ctrl.r_in[i]), .d(bus), .q(r[i]));
  end

  sp_bus_reg #(.W(WORD_W)) u_ir   (.clk, .rst, .en(ctrl.ir_in),   .d(bus), .q(ir_q));
  sp_bus_reg #(.W(WORD_W)) u_temp (.clk, .rst, .en(ctrl.temp_in), .d(bus), .q(temp));

  sp_bus_reg #(.W(PORT_W)) u_portout (
    .clk, .rst, .en(ctrl.portout_in), .d(bus[PORT_W-1:0]), .q(port_out));
  sp_bus_reg #(.W(PORT_W)) u_portin (
    .clk, .rst, .en(1'b1), .d(port_in), .q(port_in_q));
  sp_bus_reg #(.W(PORT_W)) u_config (
    .clk, .rst, .en(ctrl.config_in), .d(bus[PORT_W-1:0]), .q(cfg));

  assign ir = instr_t'(ir_q);

  // ---- ALU, Z and S ----
  sp_alu #(.W(WORD_W)) u_alu (
    .a(temp), .b(bus), .inc(ctrl.inc), .add(ctrl.add), .sub(ctrl.sub),
    .result(alu_result), .zero(alu_zero));

  sp_zs_regs #(.W(WORD_W)) u_zs (
    .clk, .rst, .alu_result, .alu_zero,
    .inc(ctrl.inc), .add(ctrl.add), .sub(ctrl.sub), .z, .s);

  // ---- counter ----
  sp_counter #(.W(CNT_W)) u_count (
    .clk, .rst, .cnt_clk, .enable(cfg[0]), .count);

  // ---- MUX-Encoder ----
  always_comb begin
    src             = '0;
    src[SRC_PC]     = pc;
    src[SRC_IR]     = WORD_W'(ir.data);
    src[SRC_Z]      = z;
    src[SRC_R0]     = r[0];
    src[SRC_R1]     = r[1];
    src[SRC_R2]     = r[2];
    src[SRC_R3]     = r[3];
    src[SRC_PORTIN] = WORD_W'(port_in_q);
    src[SRC_COUNT]  = count;
    src[SRC_SRAM]   = data_from_sram;
  end

  sp_bus_mux #(.N(NUM_SRC), .W(WORD_W)) u_mux (
    .out_en(ctrl.out_en), .src, .bus, .sel, .sel_valid);

  // ---- SRAM interface ----
  sp_sram_if u_sram_if (
    .clk, .rst, .pc, .r0(r[0]), .bus,
    .pc_r0(ctrl.pc_r0), .read(ctrl.read), .write(ctrl.write),
    .sram_addr, .sram_data, .sram_read, .sram_write);

endmodule
