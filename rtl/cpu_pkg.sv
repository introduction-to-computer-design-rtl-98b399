// cpu_pkg: types and constants shared by the accumulator processor, its
// ALU and the top level.
//
// The machine has 16-bit words and a 16-bit address bus. An instruction is
// a 4-bit opcode in bits 15:12 and a 12-bit operand in bits 11:0. The
// opcode table, the controller states and the eight ticks t0..t7 follow the
// instruction set and controller of the design; the numeric encodings of
// the state and ALU enums are this implementation's own choice.
//
// The package also holds the processor test program as a memory image
// (words 0..52), the default contents that the top level loads into
// memory.
package cpu_pkg;

  localparam int unsigned CPU_WORD_W = 16;
  localparam int unsigned CPU_ADDR_W = 16;

  typedef logic [CPU_WORD_W-1:0] word_t;
  typedef logic [CPU_ADDR_W-1:0] addr_t;

  // Opcodes, instruction bits 15:12.
  typedef enum logic [3:0] {
    OP_SPECIAL = 4'h0,  // 0000 halt, 0001 negate
    OP_MLOAD   = 4'h1,  // immediate load, sign-extended from bit 11
    OP_DLOAD   = 4'h2,  // ACC := M[0xxx]
    OP_ILOAD   = 4'h3,  // ACC := M[M[0xxx]]
    OP_DSTORE  = 4'h4,  // M[0xxx] := ACC
    OP_ISTORE  = 4'h5,  // M[M[0xxx]] := ACC
    OP_BRANCH  = 4'h6,  // PC := 0xxx
    OP_BRZERO  = 4'h7,  // if ACC = 0
    OP_BRPOS   = 4'h8,  // if ACC > 0
    OP_BRNEG   = 4'h9,  // if ACC < 0
    OP_ADD     = 4'ha   // ACC := ACC + M[0xxx]
  } opcode_t;

  // Controller states: one per instruction plus reset and fetch.
  typedef enum logic [3:0] {
    S_RESET, S_FETCH, S_HALT, S_NEGATE, S_MLOAD, S_DLOAD, S_ILOAD,
    S_DSTORE, S_ISTORE, S_BRANCH, S_BRZERO, S_BRPOS, S_BRNEG, S_ADD
  } state_t;

  // Tick counter inside a state: t0..t7.
  typedef logic [2:0] tick_t;
  localparam tick_t T0 = 3'd0, T1 = 3'd1, T2 = 3'd2, T3 = 3'd3,
                    T4 = 3'd4, T5 = 3'd5, T6 = 3'd6, T7 = 3'd7;

  typedef enum logic [1:0] {ALU_NONE, ALU_NEGATE, ALU_ADD} alu_op_t;

  // Processor test program: exercises every instruction once and ends on
  // the halt at word 25 (0x19). Words 48..52 are its data.
  localparam int unsigned TEST_WORDS = 53;
  localparam word_t TEST_PROGRAM [TEST_WORDS] = '{
    16'h1a0f, 16'h2010, 16'h3030, 16'h4034, 16'h0001,  //  0.. 4
    16'h2034, 16'h0001, 16'h5032, 16'h0001, 16'h1fff,  //  5.. 9
    16'ha008, 16'h700d, 16'h0000, 16'h1400, 16'h8010,  // 10..14
    16'h0000, 16'h0001, 16'h9013, 16'h0000, 16'h6015,  // 15..19
    16'h0000, 16'h8014, 16'h7014, 16'h0001, 16'h9014,  // 20..24
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000,  // 25..29
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000,  // 30..34
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000,  // 35..39
    16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000,  // 40..44
    16'h0000, 16'h0000, 16'h0000,                      // 45..47
    16'h0031, 16'h5af0, 16'h0033, 16'h0000, 16'hf5af   // 48..52
  };

endpackage
