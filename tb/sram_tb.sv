// sram_tb: exercises the asynchronous RAM chip with read and write cycles
// shaped like those of the design: address first, then enable, then (for a
// write) r/w' low with data, r/w' high, and only then address and enable
// removed. Checks the preset words 0xAAAA and 0x5555 after power-up, that
// the chip drives the pins only during an enabled read and never during
// reset, the three-word write/read-back memory test (1234, 5678, 9ABC
// into words 0..2), that a write while disabled or in reset changes nothing, and every
// read against a shadow copy kept here. Addresses above DEPTH alias.
module sram_tb;
  localparam int unsigned DEPTH = 64;

  logic        reset = 1, en = 0, rw = 1;
  logic [15:0] addr = '0, data_in = '0, data_out;
  logic        data_oe;
  logic [15:0] shadow [DEPTH];
  bit          known [DEPTH];
  int checks = 0, failures = 0;

  sram dut (.reset, .en, .rw, .addr, .data_in, .data_out, .data_oe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_cycle(logic [15:0] a, logic [15:0] d, bit enable = 1);
    addr = a; #5 en = enable; #5 rw = 0; data_in = d; #10 rw = 1; #5 en = 0; #5;
  endtask

  task automatic read_cycle(logic [15:0] a, output logic [15:0] d);
    addr = a; #5 en = 1; #10;
    check(data_oe, "chip drives during an enabled read");
    d = data_out;
    #5 en = 0; #1;
    check(!data_oe, "chip releases the pins when disabled");
    #4;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    #10;
    en = 1; #5;
    check(!data_oe, "no drive during reset");
    en = 0; #5 reset = 0; #10;
    read_cycle(16'h0000, d); check(d == 16'haaaa, "word 0 preset");
    read_cycle(16'h0001, d); check(d == 16'h5555, "word 1 preset");
    // The memory test sequence: read words 0..2, write 1234, 5678 and
    // 9ABC to words 0..2, read them back.
    write_cycle(16'h0000, 16'h1234);
    write_cycle(16'h0001, 16'h5678);
    write_cycle(16'h0002, 16'h9abc);
    read_cycle(16'h0000, d); check(d == 16'h1234, "memory test word 0");
    read_cycle(16'h0001, d); check(d == 16'h5678, "memory test word 1");
    read_cycle(16'h0002, d); check(d == 16'h9abc, "memory test word 2");
    foreach (known[i]) known[i] = 0;
    known[0] = 1; shadow[0] = 16'haaaa; known[1] = 1; shadow[1] = 16'h5555;
    // Writes to every word, then read back.
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = 16'($urandom); known[i] = 1;
      write_cycle(16'(i), shadow[i]);
    end
    for (int i = 0; i < DEPTH; i++) begin
      read_cycle(16'(i), d);
      check(d == shadow[i], $sformatf("read-back word %0d", i));
    end
    // A write pulse without enable stores nothing.
    write_cycle(16'd5, ~shadow[5], 0);
    read_cycle(16'd5, d); check(d == shadow[5], "disabled write ignored");
    // A write pulse during reset stores nothing.
    reset = 1; write_cycle(16'd6, ~shadow[6]); reset = 0; #5;
    read_cycle(16'd6, d); check(d == shadow[6], "write during reset ignored");
    // Address aliasing above DEPTH.
    write_cycle(16'(DEPTH + 7), 16'hc0de); shadow[7] = 16'hc0de;
    read_cycle(16'd7, d); check(d == 16'hc0de, "address decoded modulo DEPTH");
    // Random mix.
    repeat (400) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      if ($urandom_range(1)) begin
        shadow[a] = 16'($urandom); write_cycle(16'(a), shadow[a]);
      end else begin
        read_cycle(16'(a), d); check(d == shadow[a], "random read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
