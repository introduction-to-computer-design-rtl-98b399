// sram_array_8x2_tb: writes random values to random words of the 8x2 RAM
// (a 4x4 cell array) with r/w' pulses and reads all eight words back after
// each write, comparing with a copy kept here. data_in is changed while
// r/w' is high to check that it does not disturb stored words.
module sram_array_8x2_tb;
  logic [2:0] address = '0;
  logic       rw = 1;
  logic [1:0] data_in = '0, data_out;
  logic [1:0] model [8];
  int checks = 0, failures = 0;

  sram_array_8x2 dut (.address, .rw, .data_in, .data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_word(logic [2:0] a, logic [1:0] d);
    address = a; #2 data_in = d; #1 rw = 0; #3 rw = 1; #2 data_in = ~d; #2;
    model[a] = d;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) write_word(3'(a), 2'($urandom));
    repeat (200) begin
      write_word(3'($urandom), 2'($urandom));
      for (int a = 0; a < 8; a++) begin
        address = 3'(a); #1;
        check(data_out == model[a], $sformatf("word %0d read %h expected %h", a, data_out, model[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
