// data_bus_tb: tests the shared-bus model with four sources. With exactly
// one source enabled the bus must carry its value and report no conflict;
// with none it reads zero and is not busy; with several enabled it reports
// a conflict exactly when their values differ, and carries the
// lowest-numbered enabled source.
module data_bus_tb;
  localparam int N = 4;
  logic [15:0] src_data [N];
  logic [N-1:0] src_en;
  logic [15:0] bus;
  logic busy, conflict;
  int checks = 0, failures = 0;

  data_bus #(.N(N), .W(16)) dut (.src_data, .src_en, .bus, .busy, .conflict);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      logic [15:0] e;
      bit differ;
      int first;
      foreach (src_data[i]) src_data[i] = ($urandom_range(3) == 0) ? 16'h1234 : 16'($urandom);
      src_en = N'($urandom);
      #1;
      first = -1; differ = 0; e = '0;
      for (int i = 0; i < N; i++) if (src_en[i] && first < 0) begin first = i; e = src_data[i]; end
      for (int i = 0; i < N; i++) if (src_en[i] && src_data[i] != e) differ = 1;
      check(bus == e, "bus value");
      check(busy == (src_en != 0), "busy flag");
      check(conflict == differ, "conflict flag");
      #1;
    end
    // Each source alone.
    for (int i = 0; i < N; i++) begin
      foreach (src_data[j]) src_data[j] = 16'($urandom);
      src_en = N'(1) << i; #1;
      check(bus == src_data[i] && !conflict, "single source on the bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
