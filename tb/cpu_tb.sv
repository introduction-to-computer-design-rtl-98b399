// cpu_tb: runs the processor alone against a behavioural memory.
//
// The memory here is a plain array answering reads combinationally and
// storing on the rising edge of mem_rw. The program is the summing loop
// that adds the sixteen words at 0x20..0x2f into word 0x10, with random
// data. cpu_checker compares every instruction with the reference model
// (PC, ACC, cycle count, stores). The testbench also checks the fetch bus
// timing (PC on the address bus with mem_en high and mem_rw high during t1)
// and the final sum against a sum computed here.
module cpu_tb;
  import cpu_pkg::*;

  localparam int unsigned NW = 48;
  localparam word_t SUM_CODE [16] = '{
    16'h1000, 16'h4010, 16'h1020, 16'h4011, 16'h1030, 16'h0001, 16'ha011, 16'h700f,
    16'h3011, 16'ha010, 16'h4010, 16'h1001, 16'ha011, 16'h4011, 16'h6004, 16'h0000};

  function automatic word_t image_word(int i);
    if (i < 16) return SUM_CODE[i];
    if (i >= 32) return word_t'(i * 16'h1357 + 16'h0123);  // data words
    return '0;
  endfunction

  typedef word_t image_t [NW];
  function automatic image_t make_image();
    image_t im;
    for (int i = 0; i < NW; i++) im[i] = image_word(i);
    return im;
  endfunction
  localparam image_t IMAGE = make_image();

  logic   clk = 0, reset = 1;
  logic   mem_en, mem_rw, dbus_oe;
  addr_t  abus, pc, iar;
  word_t  dbus_in, dbus_out, ireg, acc;
  state_t state;
  tick_t  tick;
  word_t  tmem [65536];

  int checks = 0, failures = 0;
  int c_checks, c_failures, kind_count [cpu_model::NKINDS];
  int taken, not_taken, neg_imm, reads, writes, instructions, fetch_checks = 0;
  bit done;

  cpu dut (.clk, .reset, .mem_en, .mem_rw, .abus, .dbus_in, .dbus_out, .dbus_oe,
           .state, .tick, .pc, .ireg, .iar, .acc);

  cpu_checker #(.PROG_WORDS(NW), .PROGRAM(IMAGE)) u_chk (
    .clk, .reset, .state, .tick, .pc, .acc, .mem_en, .mem_rw, .abus, .dbus(dbus_in),
    .checks(c_checks), .failures(c_failures), .done, .kind_count,
    .taken, .not_taken, .neg_imm, .reads, .writes, .instructions);

  assign dbus_in = dbus_oe ? dbus_out : ((mem_en && mem_rw) ? tmem[abus] : '0);
  always @(posedge mem_rw) if (mem_en) tmem[abus] <= dbus_in;

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Fetch timing: during t1 of fetch the memory is enabled for reading at PC.
  always @(posedge clk) begin
    if (!reset && state == S_FETCH && tick == T1) begin
      check(mem_en && mem_rw && abus == pc, "fetch drives PC with mem_en high in t1");
      fetch_checks++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_failures);
    $finish;
  end

  initial begin
    word_t sum;
    foreach (tmem[i]) tmem[i] = '0;
    for (int i = 0; i < NW; i++) tmem[i] = IMAGE[i];
    sum = '0;
    for (int i = 32; i < 48; i++) sum = sum + IMAGE[i];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (done);
    repeat (3) @(posedge clk);
    check(state == S_HALT, "halted");
    check(tmem[16'h10] == sum, $sformatf("sum %h, expected %h", tmem[16'h10], sum));
    check(tmem[16'h11] == 16'h0030, "pointer ends at 0x30");
    check(instructions == 4 + 16 * 11 + 4 + 1, "instruction count of the loop");
    check(fetch_checks == instructions, "fetch timing checked once per instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks, failures + c_failures);
    $finish;
  end

endmodule
