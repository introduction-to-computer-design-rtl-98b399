// sram_array_8x2: an 8-word by 2-bit static RAM laid out as a 4x4 array.
//
// The array has four rows and four columns of cells. Address bits 2:1 go
// to the row decoder, which selects one row. Address bit 0 is the column
// address: it picks one column of each pair, so each word is two cells of
// the selected row. For a write (rw low), a column decoder/demultiplexer
// (an AND of the column address, or its complement, with the inverted
// read/write' line) enables the column drivers of the addressed columns
// only, and those cells of the selected row take data_in. For a read the
// sense amplifier of every column presents the selected row's bit and a
// column multiplexer per output bit picks the addressed column. Columns 0-1
// hold bit 1 and columns 2-3 hold bit 0 of the word. Each cell behaves as a
// level-sensitive storage bit (a transparent latch), which is how the
// cross-coupled inverters of a six-transistor cell act when they are
// overdriven. Asynchronous, no clock or enable. The decoders and the 4x4
// organisation follow the design; which address bit is the column address
// and which column pair holds which data bit are this implementation's
// reading.
module sram_array_8x2 (
  input  logic [2:0] address,
  input  logic       rw,        // read/write': 1 = read, 0 = write
  input  logic [1:0] data_in,
  output logic [1:0] data_out
);

  logic [3:0] row;              // word lines
  logic [3:0] col_drive;        // column drivers enabled (writing)
  logic [3:0] col_data;         // data presented by the column drivers
  logic [3:0] sense;            // sense-amplifier outputs of the selected row
  logic [3:0] store [4];        // store[r][c]

  always_comb begin
    row = '0;
    row[address[2:1]] = 1'b1;
  end

  // Column decoder/demux: column 2k+a carries bit (1-k) of the word.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      col_drive[c] = ~rw & (address[0] == c[0]);
      col_data[c]  = data_in[1 - c/2];
    end
  end

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      always_latch begin
        if (row[r] && col_drive[c]) store[r][c] = col_data[c];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      sense[c] = 1'b0;
      for (int r = 0; r < 4; r++) sense[c] = sense[c] | (store[r][c] & row[r]);
    end
  end

  // Column decoder/mux.
  assign data_out[1] = address[0] ? sense[1] : sense[0];
  assign data_out[0] = address[0] ? sense[3] : sense[2];

endmodule
