// computer_tb: end-to-end test of the computer at its default parameters.
//
// Resets the machine and lets it run the built-in processor test program
// to its halt, comparing every instruction's PC, ACC, cycle count and
// memory writes with the reference model (cpu_checker). Checks the final
// memory words the program writes and that no two drivers ever met on the
// data bus. While the processor runs it also exercises the three circuits
// beside it: register-to-register transfers over the shared bus, and write
// and read-back of every word of the 4x4 and 8x2 RAM arrays. At the end
// each mechanism is required to have happened at least once: every
// instruction kind, conditional branches both taken and not taken, a
// negative immediate, memory reads and writes, halt, bus transfers and the
// RAM array writes and reads.
module computer_tb;
  import cpu_pkg::*;

  logic        clk = 0, reset = 1;
  state_t      cpu_state;
  tick_t       cpu_tick;
  addr_t       pc, iar, abus;
  word_t       ireg, acc, dbus;
  logic        mem_en, mem_rw, bus_conflict;
  logic [2:0]  br_ld = '0, br_oe = '0;
  word_t       br_ext_data = '0;
  logic        br_ext_oe = 0;
  word_t       br_bus;
  word_t       br_q [3];
  logic        br_conflict;
  logic [1:0]  r44_address = '0;
  logic        r44_rw = 1;
  logic [3:0]  r44_data_in = '0, r44_data_out;
  logic [2:0]  r82_address = '0;
  logic        r82_rw = 1;
  logic [1:0]  r82_data_in = '0, r82_data_out;

  int checks = 0, failures = 0, conflicts = 0;
  int c_checks, c_failures, kind_count [cpu_model::NKINDS];
  int taken, not_taken, neg_imm, reads, writes, instructions;
  bit done;
  int bus_transfers = 0, r44_writes = 0, r44_reads = 0, r82_writes = 0, r82_reads = 0;

  computer dut (.*);

  cpu_checker #(.PROG_WORDS(TEST_WORDS), .PROGRAM(TEST_PROGRAM)) u_chk (
    .clk, .reset, .state(cpu_state), .tick(cpu_tick), .pc, .acc, .mem_en, .mem_rw,
    .abus, .dbus, .checks(c_checks), .failures(c_failures), .done, .kind_count,
    .taken, .not_taken, .neg_imm, .reads, .writes, .instructions);

  always #10 clk = ~clk;

  always @(posedge clk) if (!reset && bus_conflict) conflicts++;

  // Register values of the first instructions of the test program, as a
  // cycle-level trace of the machine shows them: IREG after each fetch,
  // and ACC and IAR at the end of the first four instructions.
  localparam word_t TRACE_IREG [4] = '{16'h1a0f, 16'h2010, 16'h3030, 16'h4034};
  localparam word_t TRACE_ACC  [4] = '{16'hfa0f, 16'h0001, 16'h5af0, 16'h5af0};
  int n_decoded = 0, n_traced = 0;
  state_t last_state = S_RESET;
  always @(negedge clk) begin
    if (!reset) begin
      if (cpu_state == S_FETCH && cpu_tick == T2 && n_decoded < 4) begin
        check(ireg == TRACE_IREG[n_decoded], $sformatf("IREG of instruction %0d", n_decoded));
        n_decoded++;
      end
      if (cpu_state == S_FETCH && cpu_tick == T0 && last_state != S_FETCH &&
          last_state != S_RESET && n_traced < 4) begin
        check(acc == TRACE_ACC[n_traced], $sformatf("ACC after instruction %0d", n_traced));
        if (n_traced >= 2) check(iar == 16'h0031, "IAR after the indirect load");
        n_traced++;
      end
      last_state = cpu_state;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_failures);
    $finish;
  end

  // Side circuits, driven on the falling edge while the processor runs.
  task automatic side_tests();
    word_t vals [3];
    logic [3:0] exp44 [4];
    logic [1:0] exp82 [8];
    // Three registers: load each from outside, then rotate 1->2->3->1.
    for (int i = 0; i < 3; i++) begin
      vals[i] = word_t'($urandom);
      @(negedge clk); br_ext_data = vals[i]; br_ext_oe = 1; br_oe = '0; br_ld = 3'b001 << i;
    end
    @(negedge clk); br_ext_oe = 0; br_ld = '0;
    check(br_q[0] == vals[0] && br_q[1] == vals[1] && br_q[2] == vals[2], "bus_regs load from outside");
    for (int s = 0; s < 3; s++) begin
      int dst;
      dst = (s + 1) % 3;
      @(negedge clk); br_oe = 3'b001 << s; br_ld = 3'b001 << dst;
      #1 check(br_bus == br_q[s], "bus carries the enabled register");
      check(!br_conflict, "single driver on register bus");
      @(negedge clk); br_oe = '0; br_ld = '0;
      check(br_q[dst] == br_q[s], "register transfer over the bus");
      bus_transfers++;
    end
    // 4x4 RAM: write all words, then read them back.
    for (int a = 0; a < 4; a++) begin
      exp44[a] = 4'($urandom);
      @(negedge clk); r44_address = 2'(a); r44_data_in = exp44[a];
      #1 r44_rw = 0; #5 r44_rw = 1; r44_writes++;
    end
    for (int a = 0; a < 4; a++) begin
      @(negedge clk); r44_address = 2'(a); #1;
      check(r44_data_out == exp44[a], "ram4x4 read-back"); r44_reads++;
    end
    // 8x2 RAM.
    for (int a = 0; a < 8; a++) begin
      exp82[a] = 2'($urandom);
      @(negedge clk); r82_address = 3'(a); r82_data_in = exp82[a];
      #1 r82_rw = 0; #5 r82_rw = 1; r82_writes++;
    end
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); r82_address = 3'(a); #1;
      check(r82_data_out == exp82[a], "sram_array_8x2 read-back"); r82_reads++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    fork
      side_tests();
      wait (done);
    join
    repeat (4) @(posedge clk);
    // The processor stays halted.
    check(cpu_state == S_HALT, "processor halted");
    check(pc == 16'h001a && acc == 16'h0400, "final PC and ACC of the test program");
    check(dut.u_mem.g_chip[0].u_chip.mem[51] == 16'ha510, "indirect store result at word 51");
    check(dut.u_mem.g_chip[0].u_chip.mem[52] == 16'h5af0, "direct store result at word 52");
    check(conflicts == 0, "no data-bus conflict");
    // Every mechanism happened.
    for (int k = 0; k < cpu_model::NKINDS; k++)
      check(kind_count[k] > 0 || k == int'(cpu_model::K_HALT), $sformatf("instruction kind %0d executed", k));
    check(taken > 0, "a conditional branch taken");
    check(not_taken > 0, "a conditional branch not taken");
    check(neg_imm > 0, "negative immediate sign-extended");
    check(reads > 0 && writes > 0, "memory reads and writes");
    check(done, "halt reached");
    check(n_decoded == 4 && n_traced == 4, "start of the program traced");
    check(bus_transfers == 3, "register bus transfers");
    check(r44_writes == 4 && r44_reads == 4 && r82_writes == 8 && r82_reads == 8, "RAM array cycles");
    $display("instructions=%0d reads=%0d writes=%0d taken=%0d not_taken=%0d neg_imm=%0d",
             instructions, reads, writes, taken, not_taken, neg_imm);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_failures);
    $finish;
  end

endmodule
