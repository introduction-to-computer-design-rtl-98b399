// ram_bank: a 64Kx16 memory built from four 16Kx16 SRAM chips.
//
// All chips share the read/write' line, the low 14 address bits and the
// data pins. A 2-to-4 decoder on the two upper address bits raises the
// enable of exactly one chip, so each chip holds one quarter of the address
// space and only that chip answers a read or takes a write. The chips'
// data drivers are combined on a shared bus (data_bus). Timing is that of
// the chips: purely asynchronous. The decoder is gated by the bank's own
// en input so that no chip is enabled between memory cycles; the design's
// decoder has no enable drawn, so this gating is this implementation's
// choice. Chip 0 optionally starts with a preset image in its low words.
module ram_bank #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned CHIP_DEPTH = 16384,
  parameter bit          PRELOAD    = 1'b1,
  parameter int unsigned INIT_WORDS = 2,
  parameter logic [DATA_W-1:0] INIT [INIT_WORDS] = '{16'haaaa, 16'h5555}
) (
  input  logic              reset,
  input  logic              en,
  input  logic              rw,        // 1 = read, 0 = write
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe,
  output logic [(2**ADDR_W)/CHIP_DEPTH-1:0] chip_en   // decoder outputs
);

  localparam int unsigned NUM_CHIPS = (2**ADDR_W) / CHIP_DEPTH;
  localparam int unsigned CHIP_AW   = $clog2(CHIP_DEPTH);
  localparam int unsigned SEL_W     = ADDR_W - CHIP_AW;

  logic [DATA_W-1:0] chip_data [NUM_CHIPS];
  logic [NUM_CHIPS-1:0] chip_oe;
  logic              unused_busy, unused_conflict;

  // 2-to-4 (in general SEL_W-to-NUM_CHIPS) decoder on the upper bits.
  always_comb begin
    chip_en = '0;
    if (en) chip_en[addr[ADDR_W-1 -: SEL_W]] = 1'b1;
  end

  for (genvar c = 0; c < NUM_CHIPS; c++) begin : g_chip
    sram #(
      .DATA_W     (DATA_W),
      .ADDR_W     (CHIP_AW),
      .DEPTH      (CHIP_DEPTH),
      .PRELOAD    (PRELOAD && c == 0),
      .INIT_WORDS (INIT_WORDS),
      .INIT       (INIT)
    ) u_chip (
      .reset    (reset),
      .en       (chip_en[c]),
      .rw       (rw),
      .addr     (addr[CHIP_AW-1:0]),
      .data_in  (data_in),
      .data_out (chip_data[c]),
      .data_oe  (chip_oe[c])
    );
  end

  data_bus #(.N(NUM_CHIPS), .W(DATA_W)) u_pins (
    .src_data (chip_data),
    .src_en   (chip_oe),
    .bus      (data_out),
    .busy     (unused_busy),
    .conflict (unused_conflict)
  );

  assign data_oe = |chip_oe;

endmodule
