// bus_regs: three registers exchanging data over one shared bus.
//
// Each register's D input is wired to the bus and its Q output reaches the
// bus through a tri-state buffer. A transfer from register i to register j
// is one clock cycle: oe[i] enables the source's buffer so its value is on
// the bus, and ld[j] loads the bus into the destination on the rising clock
// edge. An outside source (ext_data with ext_oe) can also drive the bus, so
// registers can be loaded from outside and read through bus_out. Several ld
// bits may be high together (broadcast); at most one source should drive,
// and conflict flags a violation. Three registers, the LD inputs and the
// tri-state outputs are from the design; the register width, the outside
// port and the synchronous active-high reset to zero are this
// implementation's choices.
module bus_regs #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 3
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [NREGS-1:0] ld,        // load register i from the bus
  input  logic [NREGS-1:0] oe,        // register i drives the bus
  input  logic [W-1:0]     ext_data,  // outside source
  input  logic             ext_oe,    // outside source drives the bus
  output logic [W-1:0]     bus_out,   // value on the bus
  output logic [W-1:0]     q [NREGS], // register contents
  output logic             conflict
);

  logic [W-1:0]     src_data [NREGS+1];
  logic [NREGS:0]   src_en;
  logic             unused_busy;

  always_comb begin
    for (int i = 0; i < NREGS; i++) src_data[i] = q[i];
    src_data[NREGS] = ext_data;
  end
  assign src_en = {ext_oe, oe};

  data_bus #(.N(NREGS + 1), .W(W)) u_bus (
    .src_data (src_data),
    .src_en   (src_en),
    .bus      (bus_out),
    .busy     (unused_busy),
    .conflict (conflict)
  );

  always_ff @(posedge clk) begin
    for (int i = 0; i < NREGS; i++) begin
      if (reset)      q[i] <= '0;
      else if (ld[i]) q[i] <= bus_out;
    end
  end

endmodule
