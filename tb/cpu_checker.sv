// cpu_checker: watches the processor's registers and memory bus and
// compares them, instruction by instruction, with the reference model
// (cpu_model) running the same memory image.
//
// An instruction boundary is the first falling clock edge at which the
// controller is in fetch at t0 after being in another state. At each
// boundary, and when the processor halts, the checker compares PC and ACC
// with the model, the number of clock cycles the instruction took with the
// model's count, and the memory writes seen on the bus (sampled when
// mem_rw rises with mem_en high) with the model's store. It counts how
// often each instruction kind ran, branches taken and not taken, negative
// immediates, reads and writes.
//
// It also checks the RAM's write-cycle rules on every write, taking one
// clock period (measured from the clock) as the minimum for each:
// address stable and mem_en high before mem_rw falls, data stable before
// mem_rw rises, and the address held (with mem_en high) after it rises. The
// address may not change while mem_rw is low.
module cpu_checker
  import cpu_pkg::*;
#(
  parameter int unsigned PROG_WORDS = 1,
  parameter word_t       PROGRAM [PROG_WORDS] = '{16'h0000}
) (
  input  logic   clk,
  input  logic   reset,
  input  state_t state,
  input  tick_t  tick,
  input  addr_t  pc,
  input  word_t  acc,
  input  logic   mem_en,
  input  logic   mem_rw,
  input  addr_t  abus,
  input  word_t  dbus,
  output int     checks,
  output int     failures,
  output bit     done,
  output int     kind_count [cpu_model::NKINDS],
  output int     taken,
  output int     not_taken,
  output int     neg_imm,
  output int     reads,
  output int     writes,
  output int     instructions
);
  import cpu_model::*;

  machine  m;
  result_t r;
  bit      in_flight;
  int      cycles, wr_this;
  state_t  prev_state;
  logic    prev_rw, prev_en;
  realtime period, t_clk, t_addr, t_en, t_data, t_rw_rise;
  bit      after_write;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("MISMATCH %s (pc=%h acc=%h model pc=%h acc=%h) at %0t", what, pc, acc, m.pc, m.acc, $time);
    end
  endtask

  initial begin
    m = new();
    for (int i = 0; i < PROG_WORDS; i++) m.mem[i] = PROGRAM[i];
    checks = 0; failures = 0; done = 0; taken = 0; not_taken = 0; neg_imm = 0;
    reads = 0; writes = 0; instructions = 0;
    foreach (kind_count[k]) kind_count[k] = 0;
    in_flight = 0; cycles = 0; wr_this = 0;
    prev_state = S_RESET; prev_rw = 1; prev_en = 0;
    period = 0; t_clk = 0; t_addr = 0; t_en = 0; t_data = 0; t_rw_rise = 0;
    after_write = 0;
  end

  task automatic finish_instr();
    check(pc == m.pc, "PC after instruction");
    check(acc == m.acc, "ACC after instruction");
    check(cycles == r.cycles, $sformatf("cycle count %0d, expected %0d", cycles, r.cycles));
    check(wr_this == int'(r.stored), "number of memory writes");
    instructions++;
    kind_count[r.kind]++;
    if (r.kind inside {K_BRZERO, K_BRPOS, K_BRNEG}) begin
      if (r.taken) taken++; else not_taken++;
    end
  endtask

  always @(negedge clk) begin
    if (reset) begin
      in_flight = 0;
      prev_state = S_RESET;
    end else if (!done) begin
      cycles++;
      if (state == S_HALT && prev_state != S_HALT) begin
        if (in_flight) begin
          finish_instr();
          check(r.halted, "halt reached where the model halts");
        end
        done = 1;
      end else if (state == S_FETCH && tick == T0 && prev_state != S_FETCH) begin
        if (in_flight) finish_instr();
        r = m.step();
        if (r.kind == K_MLOAD && m.acc[15]) neg_imm++;
        in_flight = 1;
        cycles = 0;
        wr_this = 0;
      end
      prev_state = state;
    end
  end

  // Write-cycle timing.
  always @(posedge clk) begin
    if (period == 0 && t_clk > 0) period = $realtime - t_clk;
    t_clk = $realtime;
  end

  always @(dbus) t_data = $realtime;

  always @(abus) begin
    if (!reset && in_flight) begin
      check(mem_rw, "address unchanged while mem_rw is low");
      if (after_write) begin
        check($realtime - t_rw_rise >= period, "address held after mem_rw rises");
        after_write = 0;
      end
    end
    t_addr = $realtime;
  end

  always @(negedge mem_rw) begin
    if (!reset && in_flight) begin
      check(mem_en, "mem_en high when mem_rw falls");
      check($realtime - t_addr >= period && $realtime - t_en >= period,
            "address and mem_en set up before mem_rw falls");
    end
  end

  always @(posedge mem_rw) begin
    if (!reset && in_flight && mem_en) begin
      check($realtime - t_data >= period, "data stable before mem_rw rises");
      t_rw_rise = $realtime;
      after_write = 1;
    end
  end

  always @(negedge mem_en) begin
    if (!reset && in_flight && after_write) begin
      check($realtime - t_rw_rise >= period, "mem_en held after mem_rw rises");
      after_write = 0;
    end
  end

  always @(posedge mem_en) t_en = $realtime;

  // Memory cycles seen on the bus.
  always @(mem_en or mem_rw) begin
    if (!reset && in_flight) begin
      if (mem_en && !prev_en && mem_rw) reads++;
      if (mem_rw && !prev_rw && mem_en) begin
        writes++;
        wr_this++;
        check(r.stored, "write only by a store instruction");
        check(abus == r.st_addr, $sformatf("write address %h, expected %h", abus, r.st_addr));
        check(dbus == r.st_data, $sformatf("write data %h, expected %h", dbus, r.st_data));
      end
    end
    prev_en = mem_en;
    prev_rw = mem_rw;
  end

endmodule
