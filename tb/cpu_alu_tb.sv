// cpu_alu_tb: drives the ALU with random and corner-case operands for each
// operation and compares with arithmetic done here: negate gives 0 - acc,
// add gives acc + dbus modulo 2**16, and no operation gives zero.
module cpu_alu_tb;
  import cpu_pkg::*;

  alu_op_t     op;
  logic [15:0] acc, dbus, result, expect_v;
  int checks = 0, failures = 0;

  cpu_alu dut (.op, .acc, .dbus, .result);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(alu_op_t o, logic [15:0] a, logic [15:0] d);
    int ai, di, e;
    op = o; acc = a; dbus = d;
    #1;
    ai = int'(a); di = int'(d);
    case (o)
      ALU_NEGATE: e = (65536 - ai) % 65536;
      ALU_ADD:    e = (ai + di) % 65536;
      default:    e = 0;
    endcase
    expect_v = 16'(e);
    checks++;
    if (result !== expect_v) begin
      failures++;
      $display("FAIL op=%s acc=%h dbus=%h result=%h expected=%h", o.name(), a, d, result, expect_v);
    end
  endtask

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h5af0};
    foreach (corners[i]) foreach (corners[j]) begin
      try(ALU_NEGATE, corners[i], corners[j]);
      try(ALU_ADD,    corners[i], corners[j]);
      try(ALU_NONE,   corners[i], corners[j]);
    end
    repeat (300) begin
      try(ALU_NEGATE, 16'($urandom), 16'($urandom));
      try(ALU_ADD,    16'($urandom), 16'($urandom));
      try(ALU_NONE,   16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
