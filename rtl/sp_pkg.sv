// Shared types and constants of the simple 16-bit single-bus processor.
//
// The processor moves every value over one 16-bit bus.  Exactly one source
// drives the bus in a cycle (chosen by one-hot "out" signals that an encoder
// turns into a multiplexer select) and any number of registers may load it
// (their "_in" enables).  This package holds the word widths, the opcode
// encoding of the twelve instructions, the numbering of the bus sources and
// the bundle of control signals that the control state machine sends to the
// datapath.
//
// The opcode values, the field widths (4-bit opcode, 2-bit X, 2-bit Y, 8-bit
// DATA) and the widths of PC, registers, ports, counter and SRAM address are
// those of the original design.  The bit placement of the fields in the
// instruction word (opcode in the top bits, DATA in the low byte) and the
// numbering of the bus sources are this design's choice.
package sp_pkg;

  localparam int unsigned WORD_W = 16;  // bus, registers, instructions
  localparam int unsigned ADDR_W = 9;   // SRAM word address: 512 words
  localparam int unsigned PORT_W = 8;   // PortIN, PortOUT, Config
  localparam int unsigned CNT_W  = 16;  // Count

  typedef enum logic [3:0] {
    OP_MOVI  = 4'b0000,  // Rx <- DATA
    OP_MOVE  = 4'b0001,  // Rx <- Ry
    OP_LOAD  = 4'b0010,  // Rx <- mem[256 + R0]
    OP_STORE = 4'b0011,  // mem[256 + R0] <- Ry
    OP_ADD   = 4'b0100,  // Rx <- Rx + Ry
    OP_SUB   = 4'b0101,  // Rx <- Rx - Ry, S <- (result == 0)
    OP_HALT  = 4'b0110,  // stop fetching
    OP_BNE   = 4'b0111,  // PC <- DATA if last subtraction was not zero
    OP_MVIN  = 4'b1000,  // Rx <- PortIN
    OP_MVOUT = 4'b1001,  // PortOUT <- Ry
    OP_MVCNT = 4'b1010,  // Rx <- Count
    OP_MVCFG = 4'b1011   // Config <- Ry
  } opcode_e;

  // Instruction word: OP-CODE | X | Y | DATA
  typedef struct packed {
    opcode_e    op;
    logic [1:0] x;     // destination register
    logic [1:0] y;     // source register
    logic [7:0] data;  // constant / branch target
  } instr_t;

  // Bus sources, one "out" signal each, as index into the one-hot vector
  typedef enum int unsigned {
    SRC_PC     = 0,
    SRC_IR     = 1,   // drives the zero-extended DATA field
    SRC_Z      = 2,
    SRC_R0     = 3,   // R1..R3 follow at SRC_R0 + n
    SRC_R1     = 4,
    SRC_R2     = 5,
    SRC_R3     = 6,
    SRC_PORTIN = 7,
    SRC_COUNT  = 8,
    SRC_SRAM   = 9
  } src_e;
  localparam int unsigned NUM_SRC = 10;

  // Control signals from the control state machine to the datapath
  typedef struct packed {
    logic [NUM_SRC-1:0] out_en;     // one-hot (or zero) bus source select
    logic [3:0]         r_in;       // R0_in .. R3_in
    logic               pc_in;
    logic               pc_clr;     // clear PC (processor not started)
    logic               ir_in;
    logic               temp_in;
    logic               portout_in;
    logic               config_in;
    logic               pc_r0;      // SRAM address from PC (1) or R0 (0)
    logic               read;       // Read, registered into Sram_Read
    logic               write;      // Write, registered into Sram_Write
    logic               inc;        // ALU: Z <- bus + 1
    logic               add;        // ALU: Z <- Temp + bus
    logic               sub;        // ALU: Z <- Temp - bus, S <- zero
  } ctrl_t;

endpackage
