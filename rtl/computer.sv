// computer: the accumulator processor and its memory, with the small
// memory and bus circuits beside it.
//
// Stored-program machine. The processor (cpu) drives a 16-bit address bus
// and the memory enable and read/write' lines; a 16-bit data bus is shared
// between the processor and a 64Kx16 memory (ram_bank, four 16Kx16
// asynchronous SRAM chips and a 2-to-4 decoder). The data bus is resolved by
// data_bus from the two drivers: the memory drives it during an enabled
// read, the processor during a write. Programs and data live in the same
// memory; PROGRAM is loaded into words 0..PROG_WORDS-1 at power-up and by
// default is the processor test program from cpu_pkg, which runs every
// instruction once and halts at word 0x19.
//
// The memory-cycle timing is set by the processor: its registers change on
// the rising clock edge and mem_en, mem_rw, abus and its data driver on the
// falling edge. The memory answers a read within the same half cycle in
// this model, and stores a word when mem_rw rises at the end of a write.
// bus_conflict goes high if the processor and the memory ever drive the
// data bus together; an assertion checks that it never happens at a rising
// clock edge.
//
// Three independent circuits stand beside the machine with their own ports:
// bus_regs (three registers on one bus, prefix br_), ram4x4 (gate-level
// 4x4 RAM, prefix r44_) and sram_array_8x2 (8x2 RAM in a 4x4 cell array,
// prefix r82_).
module computer
  import cpu_pkg::*;
#(
  parameter int unsigned PROG_WORDS = TEST_WORDS,
  parameter word_t       PROGRAM [PROG_WORDS] = TEST_PROGRAM
) (
  input  logic        clk,
  input  logic        reset,
  // processor and memory system, observed
  output state_t      cpu_state,
  output tick_t       cpu_tick,
  output addr_t       pc,
  output word_t       ireg,
  output addr_t       iar,
  output word_t       acc,
  output logic        mem_en,
  output logic        mem_rw,
  output addr_t       abus,
  output word_t       dbus,
  output logic        bus_conflict,
  // three registers on a shared bus
  input  logic [2:0]  br_ld,
  input  logic [2:0]  br_oe,
  input  word_t       br_ext_data,
  input  logic        br_ext_oe,
  output word_t       br_bus,
  output word_t       br_q [3],
  output logic        br_conflict,
  // gate-level 4x4 RAM
  input  logic [1:0]  r44_address,
  input  logic        r44_rw,
  input  logic [3:0]  r44_data_in,
  output logic [3:0]  r44_data_out,
  // 8x2 RAM built as a 4x4 cell array
  input  logic [2:0]  r82_address,
  input  logic        r82_rw,
  input  logic [1:0]  r82_data_in,
  output logic [1:0]  r82_data_out
);

  word_t cpu_dout, mem_dout;
  logic  cpu_doe, mem_doe;
  logic  unused_busy;
  logic [3:0] unused_chip_en;
  word_t bus_src [2];

  cpu #(.WORD_W(CPU_WORD_W), .ADDR_W(CPU_ADDR_W)) u_cpu (
    .clk      (clk),
    .reset    (reset),
    .mem_en   (mem_en),
    .mem_rw   (mem_rw),
    .abus     (abus),
    .dbus_in  (dbus),
    .dbus_out (cpu_dout),
    .dbus_oe  (cpu_doe),
    .state    (cpu_state),
    .tick     (cpu_tick),
    .pc       (pc),
    .ireg     (ireg),
    .iar      (iar),
    .acc      (acc)
  );

  ram_bank #(
    .DATA_W     (CPU_WORD_W),
    .ADDR_W     (CPU_ADDR_W),
    .CHIP_DEPTH (16384),
    .PRELOAD    (1'b1),
    .INIT_WORDS (PROG_WORDS),
    .INIT       (PROGRAM)
  ) u_mem (
    .reset    (reset),
    .en       (mem_en),
    .rw       (mem_rw),
    .addr     (abus),
    .data_in  (dbus),
    .data_out (mem_dout),
    .data_oe  (mem_doe),
    .chip_en  (unused_chip_en)
  );

  assign bus_src[0] = cpu_dout;
  assign bus_src[1] = mem_dout;

  data_bus #(.N(2), .W(CPU_WORD_W)) u_dbus (
    .src_data (bus_src),
    .src_en   ({mem_doe, cpu_doe}),
    .bus      (dbus),
    .busy     (unused_busy),
    .conflict (bus_conflict)
  );

  always_ff @(posedge clk) begin
    if (!reset) a_one_driver: assert (!bus_conflict) else $error("two drivers on the data bus");
  end

  bus_regs #(.W(CPU_WORD_W), .NREGS(3)) u_bus_regs (
    .clk      (clk),
    .reset    (reset),
    .ld       (br_ld),
    .oe       (br_oe),
    .ext_data (br_ext_data),
    .ext_oe   (br_ext_oe),
    .bus_out  (br_bus),
    .q        (br_q),
    .conflict (br_conflict)
  );

  ram4x4 u_ram4x4 (
    .address  (r44_address),
    .rw       (r44_rw),
    .data_in  (r44_data_in),
    .data_out (r44_data_out)
  );

  sram_array_8x2 u_sram8x2 (
    .address  (r82_address),
    .rw       (r82_rw),
    .data_in  (r82_data_in),
    .data_out (r82_data_out)
  );

endmodule
