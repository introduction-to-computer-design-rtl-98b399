// cpu_alu: the processor's arithmetic and logic unit.
//
// Purely combinational. With op = ALU_NEGATE the result is the two's
// complement of the accumulator (invert and add one); with op = ALU_ADD it
// is the accumulator plus the word on the data bus, modulo 2**WORD_W; for
// any other op the result is zero. These three cases are the ALU functions
// of the design. The controller loads the result into ACC on a rising clock
// edge, so the ALU has a full clock cycle to settle.
module cpu_alu
  import cpu_pkg::*;
#(
  parameter int unsigned WORD_W = 16
) (
  input  alu_op_t           op,
  input  logic [WORD_W-1:0] acc,     // accumulator
  input  logic [WORD_W-1:0] dbus,    // data bus (memory operand)
  output logic [WORD_W-1:0] result
);

  always_comb begin
    unique case (op)
      ALU_NEGATE: result = ~acc + WORD_W'(1);
      ALU_ADD:    result = acc + dbus;
      default:    result = '0;
    endcase
  end

endmodule
