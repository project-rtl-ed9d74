// Control circuit: the state machine that sequences the single-bus datapath.
//
// Every instruction starts with the same four fetch steps:
//   T1  address from PC, FromSRAMout, Read   (SRAM sees the read next cycle)
//   T2  FromSRAMout, IR_in                   (instruction word into IR)
//   T3  PCout, Inc                           (Z <- PC + 1)
//   T4  Zout, PC_in                          (PC <- PC + 1)
// followed by one to three execute steps chosen by the opcode, X and Y
// fields of IR:
//   movi  E1 IRout, Rx_in
//   move  E1 Ryout, Rx_in
//   load  E1 address from R0, Read ; E2 FromSRAMout, Rx_in
//   store E1 Ryout, address from R0, Write ; E2 Ryout, address from R0
//   add   E1 Rxout, Temp_in ; E2 Ryout, Add ; E3 Zout, Rx_in
//   sub   E1 Rxout, Temp_in ; E2 Ryout, Sub ; E3 Zout, Rx_in
//   halt  E1 -> HALT (no more fetches)
//   bne   E1 IRout, PC_in when S is clear
//   mvin  E1 PortINout, Rx_in      mvout E1 Ryout, PortOUT_in
//   mvcnt E1 Countout, Rx_in       mvcfg E1 Ryout, Config_in
// Unused opcodes (1100..1111) do nothing and fetch the next instruction.
// An instruction thus takes 5 cycles (movi, move, bne, mvin, mvout, mvcnt,
// mvcfg), 6 (load, store) or 7 (add, sub).
//
// While m68k_master is high the 68000 owns the SRAM: the machine sits in
// IDLE with PC held at zero, and it returns there from any state when the
// signal rises.  When m68k_master is low it starts fetching at address 0.
// HALT is left only through m68k_master.
//
// The fetch steps, the instruction set and the signals controlled follow
// the original design.  The execute step sequences, the branch sense of
// bne (taken when the last subtraction was not zero), holding the store
// data for a second cycle so that address and data are steady when
// Sram_Write falls, clearing PC while the 68000 owns the memory and the
// halted status output are this design's choices.  Outputs are
// combinational from the state and IR (a Moore machine on IR); the datapath
// acts on them at the next clock edge.
module sp_control
  import sp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,           // asynchronous, active high
  input  logic   m68k_master,   // 1: stay idle, 0: run
  input  instr_t ir,
  input  logic   s,             // zero status of the last subtraction
  output ctrl_t  ctrl,
  output logic   halted
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_T1, ST_T2, ST_T3, ST_T4, ST_E1, ST_E2, ST_E3, ST_HALT
  } state_e;

  state_e state, state_n;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_IDLE;
    else     state <= state_n;
  end

  // Next state
  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE: state_n = ST_T1;
      ST_T1:   state_n = ST_T2;
      ST_T2:   state_n = ST_T3;
      ST_T3:   state_n = ST_T4;
      ST_T4:   state_n = ST_E1;
      ST_E1: begin
        unique case (ir.op)
          OP_LOAD, OP_STORE, OP_ADD, OP_SUB: state_n = ST_E2;
          OP_HALT:                           state_n = ST_HALT;
          default:                           state_n = ST_T1;
        endcase
      end
      ST_E2:   state_n = (ir.op == OP_ADD || ir.op == OP_SUB) ? ST_E3 : ST_T1;
      ST_E3:   state_n = ST_T1;
      ST_HALT: state_n = ST_HALT;
      default: state_n = ST_IDLE;
    endcase
    if (m68k_master) state_n = ST_IDLE;
  end

  // Outputs
  always_comb begin
    ctrl       = '0;
    ctrl.pc_r0 = 1'b1;
    unique case (state)
      ST_IDLE: ctrl.pc_clr = 1'b1;
      ST_T1: begin
        ctrl.pc_r0            = 1'b1;
        ctrl.read             = 1'b1;
        ctrl.out_en[SRC_SRAM] = 1'b1;
      end
      ST_T2: begin
        ctrl.out_en[SRC_SRAM] = 1'b1;
        ctrl.ir_in            = 1'b1;
      end
      ST_T3: begin
        ctrl.out_en[SRC_PC] = 1'b1;
        ctrl.inc            = 1'b1;
      end
      ST_T4: begin
        ctrl.out_en[SRC_Z] = 1'b1;
        ctrl.pc_in         = 1'b1;
      end
      ST_E1: begin
        unique case (ir.op)
          OP_MOVI: begin
            ctrl.out_en[SRC_IR] = 1'b1;
            ctrl.r_in[ir.x]     = 1'b1;
          end
          OP_MOVE: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.r_in[ir.x]                 = 1'b1;
          end
          OP_LOAD: begin
            ctrl.pc_r0 = 1'b0;
            ctrl.read  = 1'b1;
          end
          OP_STORE: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.pc_r0                      = 1'b0;
            ctrl.write                      = 1'b1;
          end
          OP_ADD, OP_SUB: begin
            ctrl.out_en[SRC_R0 + 32'(ir.x)] = 1'b1;
            ctrl.temp_in                    = 1'b1;
          end
          OP_BNE: begin
            if (!s) begin
              ctrl.out_en[SRC_IR] = 1'b1;
              ctrl.pc_in          = 1'b1;
            end
          end
          OP_MVIN: begin
            ctrl.out_en[SRC_PORTIN] = 1'b1;
            ctrl.r_in[ir.x]         = 1'b1;
          end
          OP_MVOUT: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.portout_in                 = 1'b1;
          end
          OP_MVCNT: begin
            ctrl.out_en[SRC_COUNT] = 1'b1;
            ctrl.r_in[ir.x]        = 1'b1;
          end
          OP_MVCFG: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.config_in                  = 1'b1;
          end
          default: ;  // halt and unused opcodes: no data transfer
        endcase
      end
      ST_E2: begin
        unique case (ir.op)
          OP_LOAD: begin
            ctrl.out_en[SRC_SRAM] = 1'b1;
            ctrl.r_in[ir.x]       = 1'b1;
          end
          OP_STORE: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.pc_r0                      = 1'b0;
          end
          OP_ADD: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.add                        = 1'b1;
          end
          OP_SUB: begin
            ctrl.out_en[SRC_R0 + 32'(ir.y)] = 1'b1;
            ctrl.sub                        = 1'b1;
          end
          default: ;
        endcase
      end
      ST_E3: begin
        ctrl.out_en[SRC_Z] = 1'b1;
        ctrl.r_in[ir.x]    = 1'b1;
      end
      default: ;  // HALT: nothing
    endcase
  end

  assign halted = (state == ST_HALT);

  // At most one bus source and at most one ALU function per cycle
  a_one_source: assert property (@(posedge clk) disable iff (rst) $onehot0(ctrl.out_en));
  a_one_alu_op: assert property (@(posedge clk) disable iff (rst) $onehot0({ctrl.inc, ctrl.add, ctrl.sub}));

endmodule
