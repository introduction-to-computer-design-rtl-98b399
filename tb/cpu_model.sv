// cpu_model: instruction-level reference model of the accumulator machine,
// written from the instruction set alone, for the testbenches.
//
// step() executes one instruction on a 64K-word memory image and reports
// what it did: the opcode class, whether a branch was taken, whether it
// stored (and where and what), and how many clock cycles the instruction
// takes including its 3-cycle fetch. Cycle counts follow the controller's
// tick schedule: 1 execute cycle for negate, immediate load and branches,
// 3 for direct load and add, 5 for direct store, 6 for indirect load and 8
// for indirect store.
package cpu_model;

  typedef enum int {
    K_HALT, K_NEGATE, K_MLOAD, K_DLOAD, K_ILOAD, K_DSTORE, K_ISTORE,
    K_BRANCH, K_BRZERO, K_BRPOS, K_BRNEG, K_ADD
  } kind_e;

  localparam int NKINDS = 12;

  typedef struct {
    kind_e        kind;
    bit           taken;       // conditional branch taken
    bit           stored;
    logic [15:0]  st_addr;
    logic [15:0]  st_data;
    int           cycles;      // fetch + execute
    bit           halted;
  } result_t;

  class machine;
    logic [15:0] mem [65536];
    logic [15:0] pc;
    logic [15:0] acc;

    function new();
      pc = 0; acc = 0;
      foreach (mem[i]) mem[i] = 16'h0000;
    endfunction

    function result_t step();
      result_t     r;
      logic [15:0] ir, opnd, ptr;
      ir   = mem[pc];
      pc   = pc + 1;
      opnd = {4'h0, ir[11:0]};
      r.taken = 0; r.stored = 0; r.st_addr = 0; r.st_data = 0; r.halted = 0;
      case (ir[15:12])
        4'h0: begin
          if (ir[11:0] == 12'h001) begin
            r.kind = K_NEGATE; acc = -acc; r.cycles = 3 + 1;
          end else begin
            r.kind = K_HALT; r.halted = 1; r.cycles = 3;
          end
        end
        4'h1: begin r.kind = K_MLOAD; acc = {{4{ir[11]}}, ir[11:0]}; r.cycles = 4; end
        4'h2: begin r.kind = K_DLOAD; acc = mem[opnd]; r.cycles = 6; end
        4'h3: begin r.kind = K_ILOAD; ptr = mem[opnd]; acc = mem[ptr]; r.cycles = 9; end
        4'h4: begin
          r.kind = K_DSTORE; mem[opnd] = acc; r.cycles = 8;
          r.stored = 1; r.st_addr = opnd; r.st_data = acc;
        end
        4'h5: begin
          r.kind = K_ISTORE; ptr = mem[opnd]; mem[ptr] = acc; r.cycles = 11;
          r.stored = 1; r.st_addr = ptr; r.st_data = acc;
        end
        4'h6: begin r.kind = K_BRANCH; pc = opnd; r.taken = 1; r.cycles = 4; end
        4'h7: begin r.kind = K_BRZERO; r.taken = (acc == 0); if (r.taken) pc = opnd; r.cycles = 4; end
        4'h8: begin r.kind = K_BRPOS; r.taken = (!acc[15] && acc != 0); if (r.taken) pc = opnd; r.cycles = 4; end
        4'h9: begin r.kind = K_BRNEG; r.taken = acc[15]; if (r.taken) pc = opnd; r.cycles = 4; end
        4'ha: begin r.kind = K_ADD; acc = acc + mem[opnd]; r.cycles = 6; end
        default: begin r.kind = K_HALT; r.halted = 1; r.cycles = 3; end
      endcase
      return r;
    endfunction
  endclass

endpackage
