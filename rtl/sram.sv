// sram: asynchronous static RAM chip with a shared (tri-state) data pin.
//
// There is no clock. The chip responds when en is high: with r/w' (rw)
// high it drives the addressed word onto the data pins (data_out with
// data_oe high); with rw low it stops driving and stores data_in into the
// addressed word. While reset is high the chip neither drives nor writes.
// A read is combinational: data_out follows addr after the access time of
// the part. The store completes when rw is raised again at the end of the
// write pulse, so data_in must be stable before rw rises and addr must stay
// valid until after it rises, which is the write-cycle rule of the design
// (address set up before rw falls, data held until rw rises, address held
// after rw rises).
//
// When PRELOAD is set, words 0..INIT_WORDS-1 start out holding INIT
// (by default 0xAAAA and 0x5555, the two words the design's memory model
// initialises); the rest of the array starts undefined. Loading the preset
// words at power-up rather than on every reset is this implementation's
// choice. Addresses are decoded modulo DEPTH, using the low $clog2(DEPTH)
// bits. The default size, 64 words of 16 bits, is the size of the design's
// memory model; the 16Kx16 chips of the larger memory are instances with
// DEPTH = 16384.
module sram #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned DEPTH      = 64,
  parameter bit          PRELOAD    = 1'b1,
  parameter int unsigned INIT_WORDS = 2,
  parameter logic [DATA_W-1:0] INIT [INIT_WORDS] = '{16'haaaa, 16'h5555}
) (
  input  logic              reset,
  input  logic              en,        // chip enable
  input  logic              rw,        // read/write': 1 = read, 0 = write
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,   // value on the data pins
  output logic [DATA_W-1:0] data_out,  // value the chip drives
  output logic              data_oe    // the chip drives the data pins
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [IDX_W-1:0]  idx;

  assign idx = IDX_W'(addr);

  // Preset contents.
  initial begin
    if (PRELOAD) begin
      for (int i = 0; i < INIT_WORDS && i < DEPTH; i++) mem[i] = INIT[i];
    end
  end

  // Write: the word is stored at the end of the write pulse.
  always_ff @(posedge rw) begin
    if (en && !reset) mem[idx] <= data_in;
  end

  // Read: combinational, driven only during an enabled read.
  assign data_out = mem[idx];
  assign data_oe  = en && rw && !reset;

endmodule
