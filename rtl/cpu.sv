// cpu: a 16-bit accumulator processor with a fetch/execute controller.
//
// Registers: program counter PC, instruction register IREG, indirect
// address register IAR and accumulator ACC, plus the controller's state
// (which instruction is executing) and tick (t0..t7, the clock cycle within
// that state). Every instruction starts with a three-cycle fetch: at t0 PC
// goes on the address bus with mem_en high, at t1 the word on the data bus
// is loaded into IREG, and at t2 the upper four bits are decoded into the
// next state and PC is incremented. The execute state then runs for a
// fixed number of ticks and returns to fetch at t0:
//
//   negate, mload, branch, brZero, brPos, brNeg   1 cycle
//   dLoad, add                                    3 cycles
//   dStore                                        5 cycles
//   iLoad                                         6 cycles
//   iStore                                        8 cycles
//   halt                                          stays in halt
//
// Two clock edges are used, as in the design: registers, state and tick
// change on the rising edge; the memory interface (mem_en, mem_rw, abus and
// the data-bus driver) changes on the falling edge, half a cycle later, so
// the asynchronous memory sees a stable address before it is enabled and a
// stable address and data while mem_rw is low. Memory data is sampled on
// the rising edge that ends the first full cycle with mem_en high.
// A write holds mem_rw low for two cycles, lowering it one cycle after the
// address is applied and raising it one cycle before the address is
// removed. Reset is synchronous and active high; it clears every register
// and parks the bus (mem_en low, mem_rw high, address zero, data driver off).
//
// The data bus is split into dbus_in (what is on the bus), dbus_out and
// dbus_oe (this unit's tri-state driver); the top level resolves the bus.
// Timing of add and iStore, and the encodings of state and tick, are this
// implementation's reading of the timing diagrams; everything else follows
// the controller of the design.
module cpu
  import cpu_pkg::*;
#(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              reset,
  // memory interface
  output logic              mem_en,    // memory enable
  output logic              mem_rw,    // 1 = read, 0 = write
  output logic [ADDR_W-1:0] abus,      // address bus
  input  logic [WORD_W-1:0] dbus_in,   // value on the data bus
  output logic [WORD_W-1:0] dbus_out,  // value this unit drives
  output logic              dbus_oe,   // drive enable for dbus_out
  // register and controller observation
  output state_t            state,
  output tick_t             tick,
  output logic [ADDR_W-1:0] pc,
  output logic [WORD_W-1:0] ireg,
  output logic [ADDR_W-1:0] iar,
  output logic [WORD_W-1:0] acc
);

  logic [WORD_W-1:0] alu_result;
  alu_op_t           alu_op;
  logic [ADDR_W-1:0] operand_addr;   // zero-extended 12-bit operand
  logic [WORD_W-1:0] immediate;      // sign-extended 12-bit operand

  assign operand_addr = ADDR_W'(ireg[11:0]);
  assign immediate    = {{(WORD_W-12){ireg[11]}}, ireg[11:0]};

  always_comb begin
    unique case (state)
      S_NEGATE: alu_op = ALU_NEGATE;
      S_ADD:    alu_op = ALU_ADD;
      default:  alu_op = ALU_NONE;
    endcase
  end

  cpu_alu #(.WORD_W(WORD_W)) u_alu (
    .op     (alu_op),
    .acc    (acc),
    .dbus   (dbus_in),
    .result (alu_result)
  );

  // Instruction decode: the state that executes the word in IREG.
  function automatic state_t decode(logic [WORD_W-1:0] instr);
    unique case (opcode_t'(instr[15:12]))
      OP_SPECIAL: return (instr[11:0] == 12'h001) ? S_NEGATE : S_HALT;
      OP_MLOAD:   return S_MLOAD;
      OP_DLOAD:   return S_DLOAD;
      OP_ILOAD:   return S_ILOAD;
      OP_DSTORE:  return S_DSTORE;
      OP_ISTORE:  return S_ISTORE;
      OP_BRANCH:  return S_BRANCH;
      OP_BRZERO:  return S_BRZERO;
      OP_BRPOS:   return S_BRPOS;
      OP_BRNEG:   return S_BRNEG;
      OP_ADD:     return S_ADD;
      default:    return S_HALT;
    endcase
  endfunction

  // Rising edge: registers, state and tick.
  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_RESET;
      tick  <= T0;
      pc    <= '0;
      ireg  <= '0;
      iar   <= '0;
      acc   <= '0;
    end else begin
      tick <= tick + 3'd1;  // advance by default, t7 wraps to t0
      unique case (state)
        S_RESET: begin
          state <= S_FETCH;
          tick  <= T0;
        end
        S_FETCH: begin
          if (tick == T1) ireg <= dbus_in;
          if (tick == T2) begin
            state <= decode(ireg);
            pc    <= pc + ADDR_W'(1);
            tick  <= T0;
          end
        end
        S_HALT: tick <= T0;
        S_NEGATE: begin
          acc   <= alu_result;
          state <= S_FETCH;
          tick  <= T0;
        end
        S_MLOAD: begin
          acc   <= immediate;
          state <= S_FETCH;
          tick  <= T0;
        end
        S_DLOAD, S_ADD: begin
          if (tick == T1) acc <= (state == S_ADD) ? alu_result : dbus_in;
          if (tick == T2) begin
            state <= S_FETCH;
            tick  <= T0;
          end
        end
        S_ILOAD: begin
          if (tick == T1) iar <= ADDR_W'(dbus_in);
          if (tick == T4) acc <= dbus_in;
          if (tick == T5) begin
            state <= S_FETCH;
            tick  <= T0;
          end
        end
        S_DSTORE: begin
          if (tick == T4) begin
            state <= S_FETCH;
            tick  <= T0;
          end
        end
        S_ISTORE: begin
          if (tick == T1) iar <= ADDR_W'(dbus_in);
          if (tick == T7) begin
            state <= S_FETCH;
            tick  <= T0;
          end
        end
        S_BRANCH, S_BRZERO, S_BRPOS, S_BRNEG: begin
          if ((state == S_BRANCH) ||
              (state == S_BRZERO && acc == '0) ||
              (state == S_BRPOS  && !acc[WORD_W-1] && acc != '0) ||
              (state == S_BRNEG  && acc[WORD_W-1]))
            pc <= operand_addr;
          state <= S_FETCH;
          tick  <= T0;
        end
        default: begin
          state <= S_HALT;
          tick  <= T0;
        end
      endcase
    end
  end

  // Falling edge: memory control, address bus and data-bus driver.
  always_ff @(negedge clk) begin
    if (reset) begin
      mem_en   <= 1'b0;
      mem_rw   <= 1'b1;
      abus     <= '0;
      dbus_out <= '0;
      dbus_oe  <= 1'b0;
    end else begin
      unique case (state)
        S_FETCH: begin
          if (tick == T0) begin mem_en <= 1'b1; abus <= pc; end
          if (tick == T2) begin mem_en <= 1'b0; abus <= '0; end
        end
        S_DLOAD, S_ADD: begin
          if (tick == T0) begin mem_en <= 1'b1; abus <= operand_addr; end
          if (tick == T2) begin mem_en <= 1'b0; abus <= '0; end
        end
        S_ILOAD: begin
          if (tick == T0) begin mem_en <= 1'b1; abus <= operand_addr; end
          if (tick == T2) begin mem_en <= 1'b0; abus <= '0; end
          if (tick == T3) begin mem_en <= 1'b1; abus <= iar; end
          if (tick == T5) begin mem_en <= 1'b0; abus <= '0; end
        end
        S_DSTORE: begin
          if (tick == T0) begin mem_en <= 1'b1; abus <= operand_addr; end
          if (tick == T1) begin mem_rw <= 1'b0; dbus_out <= acc; dbus_oe <= 1'b1; end
          if (tick == T3) mem_rw <= 1'b1;
          if (tick == T4) begin mem_en <= 1'b0; abus <= '0; dbus_oe <= 1'b0; end
        end
        S_ISTORE: begin
          if (tick == T0) begin mem_en <= 1'b1; abus <= operand_addr; end
          if (tick == T2) begin mem_en <= 1'b0; abus <= '0; end
          if (tick == T3) begin mem_en <= 1'b1; abus <= iar; end
          if (tick == T4) begin mem_rw <= 1'b0; dbus_out <= acc; dbus_oe <= 1'b1; end
          if (tick == T6) mem_rw <= 1'b1;
          if (tick == T7) begin mem_en <= 1'b0; abus <= '0; dbus_oe <= 1'b0; end
        end
        default: ;
      endcase
    end
  end

  // A write strobe only ever occurs inside an enabled memory cycle, and the
  // data driver is only on while the memory is in write mode or about to
  // leave it.
  always_ff @(posedge clk) begin
    if (!reset && !mem_rw) begin
      a_write_enabled:  assert (mem_en)  else $error("memory write strobe outside an enabled cycle");
      a_drive_in_write: assert (dbus_oe) else $error("memory write without data on the bus");
    end
  end

endmodule
