// ram_bank_tb: tests the 64Kx16 memory built from four 16Kx16 chips.
//
// Writes words into all four quarters of the address space, including the
// first and last word of each chip and words that share their low 14 bits,
// then reads them back. Checks that the 2-to-4 decoder enables exactly the
// chip named by address bits 15:14 while en is high and none while en is
// low, that the bank drives the data pins only during an enabled read, and
// that the preset words of chip 0 are present after power-up.
module ram_bank_tb;
  logic        reset = 1, en = 0, rw = 1;
  logic [15:0] addr = '0, data_in = '0, data_out;
  logic        data_oe;
  logic [3:0]  chip_en;
  logic [15:0] shadow [logic [15:0]];
  int checks = 0, failures = 0;
  int chip_hits [4] = '{0, 0, 0, 0};

  ram_bank dut (.reset, .en, .rw, .addr, .data_in, .data_out, .data_oe, .chip_en);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_cycle(logic [15:0] a, logic [15:0] d);
    addr = a; #5 en = 1; #1;
    check(chip_en == (4'b0001 << a[15:14]), "decoder selects one chip");
    chip_hits[a[15:14]]++;
    #4 rw = 0; data_in = d; #10 rw = 1; #5 en = 0; #1;
    check(chip_en == 4'b0000, "no chip enabled between cycles");
    #4;
  endtask

  task automatic read_cycle(logic [15:0] a, output logic [15:0] d);
    addr = a; #5 en = 1; #10;
    check(data_oe, "bank drives during read");
    d = data_out;
    #5 en = 0; #5;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic [15:0] addrs [$];
    #10 reset = 0; #10;
    read_cycle(16'h0000, d); check(d == 16'haaaa, "preset word 0");
    read_cycle(16'h0001, d); check(d == 16'h5555, "preset word 1");
    for (int c = 0; c < 4; c++) begin
      addrs.push_back(16'(c * 16384));
      addrs.push_back(16'(c * 16384 + 16383));
      addrs.push_back(16'(c * 16384 + 16'h0123));
    end
    repeat (200) addrs.push_back(16'($urandom));
    foreach (addrs[i]) begin
      d = 16'($urandom);
      shadow[addrs[i]] = d;
      write_cycle(addrs[i], d);
    end
    foreach (shadow[a]) begin
      read_cycle(a, d);
      check(d == shadow[a], $sformatf("read-back at %h", a));
    end
    for (int c = 0; c < 4; c++) check(chip_hits[c] > 0, $sformatf("chip %0d used", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
