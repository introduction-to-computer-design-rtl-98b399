// ram4x4_tb: writes random values to random words of the 4x4 gate-level
// RAM with r/w' pulses and reads every word back after each write,
// comparing with a copy kept here. Also checks that changing data_in while
// r/w' is high does not disturb the stored words, and that data_out
// follows the address while reading.
module ram4x4_tb;
  logic [1:0] address = '0;
  logic       rw = 1;
  logic [3:0] data_in = '0, data_out;
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  ram4x4 dut (.address, .rw, .data_in, .data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_word(logic [1:0] a, logic [3:0] d);
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
    for (int a = 0; a < 4; a++) write_word(2'(a), 4'($urandom));
    repeat (200) begin
      write_word(2'($urandom), 4'($urandom));
      for (int a = 0; a < 4; a++) begin
        address = 2'(a); #1;
        check(data_out == model[a], $sformatf("word %0d read %h expected %h", a, data_out, model[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
