// computer_prog_tb: runs two further programs on the complete computer.
//
// Instance u_sum runs the summing loop that adds the sixteen words at
// 0x20..0x2f into word 0x10 (data chosen here). Instance u_far stores four
// values through pointers into all four 16K quarters of memory (one per
// SRAM chip), loads them back through the same pointers and adds them into
// word 0x34. Each instance is checked instruction by instruction against
// the reference model (cpu_checker); the end results are checked against
// values computed here, and the far-memory program must enable every chip
// of the memory bank.
module computer_prog_tb;
  import cpu_pkg::*;

  // Summing loop and its data.
  localparam word_t SUM_CODE [16] = '{
    16'h1000, 16'h4010, 16'h1020, 16'h4011, 16'h1030, 16'h0001, 16'ha011, 16'h700f,
    16'h3011, 16'ha010, 16'h4010, 16'h1001, 16'ha011, 16'h4011, 16'h6004, 16'h0000};
  typedef word_t image_t [48];
  function automatic image_t sum_image();
    image_t im;
    for (int i = 0; i < 48; i++)
      im[i] = (i < 16) ? SUM_CODE[i] : (i >= 32) ? word_t'(i * 16'h2f1d + 16'h8001) : '0;
    return im;
  endfunction
  localparam image_t SUM_IMAGE = sum_image();

  // Far-memory program: pointers at 0x30..0x33, result at 0x34.
  localparam word_t FAR_CODE [20] = '{
    16'h1123, 16'h5030, 16'h1456, 16'h5031, 16'h1789, 16'h5032, 16'h1abc, 16'h5033,
    16'h3030, 16'h4034, 16'h3031, 16'ha034, 16'h4034, 16'h3032, 16'ha034, 16'h4034,
    16'h3033, 16'ha034, 16'h4034, 16'h0000};
  typedef word_t far_t [53];
  function automatic far_t far_image();
    far_t im;
    for (int i = 0; i < 53; i++) im[i] = (i < 20) ? FAR_CODE[i] : '0;
    im[48] = 16'h4040; im[49] = 16'h8040; im[50] = 16'hc040; im[51] = 16'h0040;
    return im;
  endfunction
  localparam far_t FAR_IMAGE = far_image();

  logic clk = 0, reset = 1;
  always #10 clk = ~clk;

  // Per-instance observation.
  state_t st [2];
  tick_t  tk [2];
  addr_t  pc [2], iar [2], abus [2];
  word_t  ireg [2], acc [2], dbus [2];
  logic   en [2], rw [2], conf [2];
  word_t  br_bus [2];
  word_t  br_q [2][3];
  logic   br_conf [2];
  logic [3:0] r44_out [2];
  logic [1:0] r82_out [2];

  computer #(.PROG_WORDS(48), .PROGRAM(SUM_IMAGE)) u_sum (
    .clk, .reset, .cpu_state(st[0]), .cpu_tick(tk[0]), .pc(pc[0]), .ireg(ireg[0]),
    .iar(iar[0]), .acc(acc[0]), .mem_en(en[0]), .mem_rw(rw[0]), .abus(abus[0]),
    .dbus(dbus[0]), .bus_conflict(conf[0]),
    .br_ld('0), .br_oe('0), .br_ext_data('0), .br_ext_oe(1'b0), .br_bus(br_bus[0]),
    .br_q(br_q[0]), .br_conflict(br_conf[0]),
    .r44_address('0), .r44_rw(1'b1), .r44_data_in('0), .r44_data_out(r44_out[0]),
    .r82_address('0), .r82_rw(1'b1), .r82_data_in('0), .r82_data_out(r82_out[0]));

  computer #(.PROG_WORDS(53), .PROGRAM(FAR_IMAGE)) u_far (
    .clk, .reset, .cpu_state(st[1]), .cpu_tick(tk[1]), .pc(pc[1]), .ireg(ireg[1]),
    .iar(iar[1]), .acc(acc[1]), .mem_en(en[1]), .mem_rw(rw[1]), .abus(abus[1]),
    .dbus(dbus[1]), .bus_conflict(conf[1]),
    .br_ld('0), .br_oe('0), .br_ext_data('0), .br_ext_oe(1'b0), .br_bus(br_bus[1]),
    .br_q(br_q[1]), .br_conflict(br_conf[1]),
    .r44_address('0), .r44_rw(1'b1), .r44_data_in('0), .r44_data_out(r44_out[1]),
    .r82_address('0), .r82_rw(1'b1), .r82_data_in('0), .r82_data_out(r82_out[1]));

  int c_checks [2], c_failures [2], kinds0 [cpu_model::NKINDS], kinds1 [cpu_model::NKINDS];
  int taken [2], not_taken [2], neg_imm [2], reads [2], writes [2], instrs [2];
  bit done [2];

  cpu_checker #(.PROG_WORDS(48), .PROGRAM(SUM_IMAGE)) u_chk0 (
    .clk, .reset, .state(st[0]), .tick(tk[0]), .pc(pc[0]), .acc(acc[0]), .mem_en(en[0]),
    .mem_rw(rw[0]), .abus(abus[0]), .dbus(dbus[0]), .checks(c_checks[0]),
    .failures(c_failures[0]), .done(done[0]), .kind_count(kinds0), .taken(taken[0]),
    .not_taken(not_taken[0]), .neg_imm(neg_imm[0]), .reads(reads[0]), .writes(writes[0]),
    .instructions(instrs[0]));

  cpu_checker #(.PROG_WORDS(53), .PROGRAM(FAR_IMAGE)) u_chk1 (
    .clk, .reset, .state(st[1]), .tick(tk[1]), .pc(pc[1]), .acc(acc[1]), .mem_en(en[1]),
    .mem_rw(rw[1]), .abus(abus[1]), .dbus(dbus[1]), .checks(c_checks[1]),
    .failures(c_failures[1]), .done(done[1]), .kind_count(kinds1), .taken(taken[1]),
    .not_taken(not_taken[1]), .neg_imm(neg_imm[1]), .reads(reads[1]), .writes(writes[1]),
    .instructions(instrs[1]));

  int checks = 0, failures = 0;
  int quarter_hits [4] = '{0, 0, 0, 0};

  always @(posedge en[1]) quarter_hits[abus[1][15:14]]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int total_checks();
    return checks + c_checks[0] + c_checks[1];
  endfunction
  function automatic int total_failures();
    return failures + c_failures[0] + c_failures[1];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  initial begin
    word_t sum;
    sum = '0;
    for (int i = 32; i < 48; i++) sum = sum + SUM_IMAGE[i];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (done[0] && done[1]);
    repeat (3) @(posedge clk);
    check(st[0] == S_HALT && st[1] == S_HALT, "both programs halted");
    check(u_sum.u_mem.g_chip[0].u_chip.mem[16'h10] == sum, "sum of words 0x20..0x2f");
    check(u_sum.u_mem.g_chip[0].u_chip.mem[16'h11] == 16'h0030, "pointer ends at 0x30");
    check(u_far.u_mem.g_chip[1].u_chip.mem[16'h0040] == 16'h0123, "word 0x4040 in chip 1");
    check(u_far.u_mem.g_chip[2].u_chip.mem[16'h0040] == 16'h0456, "word 0x8040 in chip 2");
    check(u_far.u_mem.g_chip[3].u_chip.mem[16'h0040] == 16'h0789, "word 0xc040 in chip 3");
    check(u_far.u_mem.g_chip[0].u_chip.mem[16'h0040] == 16'hfabc, "word 0x0040 in chip 0");
    check(u_far.u_mem.g_chip[0].u_chip.mem[16'h0034] == 16'h07be, "far-memory sum");
    for (int c = 0; c < 4; c++) check(quarter_hits[c] > 0, $sformatf("memory chip %0d used", c));
    check(instrs[0] == 185 && instrs[1] == 20, "instruction counts");
    $display("sum program: %0d instructions; far program: %0d instructions", instrs[0], instrs[1]);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
