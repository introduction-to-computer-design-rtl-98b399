// data_bus: a shared bus with N sources, each behind a tri-state buffer.
//
// Source i places src_data[i] on the bus while src_en[i] is high. With one
// source enabled the bus carries that source's value, which makes the bus a
// distributed multiplexer. With no source enabled the bus floats; this
// two-state model then reads zero, as if the bus were weakly pulled low.
// Two enabled sources that drive the same value do not fight; two that
// drive different values do, and conflict goes high. In that case the model
// lets the lowest-numbered enabled source win, so a source that keeps
// driving while a second one turns on (as the processor does for one cycle
// after the end of a memory write, while the memory reads back the word it
// has just stored) stays on the bus without a simulation race. Purely
// combinational. The bus itself and the one-value rule are from the design;
// the pull-down reading, the priority and the conflict flag are this
// implementation's way of writing tri-state buffers as ordinary logic.
module data_bus #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] src_data [N],
  input  logic [N-1:0] src_en,
  output logic [W-1:0] bus,
  output logic         busy,       // some source drives the bus
  output logic         conflict    // two sources drive different values
);

  always_comb begin
    bus = '0;
    for (int i = N - 1; i >= 0; i--)
      if (src_en[i]) bus = src_data[i];
  end

  always_comb begin
    conflict = 1'b0;
    for (int i = 0; i < N; i++)
      if (src_en[i] && src_data[i] != bus) conflict = 1'b1;
  end

  assign busy = |src_en;

endmodule
