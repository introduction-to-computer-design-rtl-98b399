// bus_regs_tb: loads the three registers from outside over the bus, then
// performs random register-to-register transfers (one source, one or more
// destinations per clock) and random outside loads, comparing the
// registers after every clock with a copy kept here. Also checks the bus
// value during each transfer and the conflict flag when two registers with
// different contents drive together.
module bus_regs_tb;
  logic        clk = 0, reset = 1;
  logic [2:0]  ld = '0, oe = '0;
  logic [15:0] ext_data = '0;
  logic        ext_oe = 0;
  logic [15:0] bus_out;
  logic [15:0] q [3];
  logic        conflict;
  logic [15:0] model [3];
  int checks = 0, failures = 0;

  bus_regs dut (.clk, .reset, .ld, .oe, .ext_data, .ext_oe, .bus_out, .q, .conflict);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); reset = 0;
    foreach (model[i]) model[i] = '0;
    check(q[0] == 0 && q[1] == 0 && q[2] == 0, "reset clears registers");
    repeat (400) begin
      logic [15:0] bv;
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        ext_data = 16'($urandom); ext_oe = 1; oe = '0; bv = ext_data;
      end else begin
        int s;
        s = $urandom_range(2);
        ext_oe = 0; oe = 3'b001 << s; bv = model[s];
      end
      ld = 3'($urandom);
      #1 check(bus_out == bv, "bus carries the source");
      check(!conflict, "single source");
      @(posedge clk); #1;
      for (int i = 0; i < 3; i++) if (ld[i]) model[i] = bv;
      for (int i = 0; i < 3; i++) check(q[i] == model[i], "register contents");
    end
    // Two registers with different contents on the bus at once.
    @(negedge clk);
    ext_data = 16'h1111; ext_oe = 1; ld = 3'b001; oe = '0;
    @(negedge clk); ext_data = 16'h2222; ld = 3'b010;
    @(negedge clk); ext_oe = 0; ld = '0; oe = 3'b011; #1;
    check(conflict, "conflict flagged for two different drivers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
