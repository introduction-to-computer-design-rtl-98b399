// ram4x4: a 4-word by 4-bit RAM drawn at gate level.
//
// A row decoder turns the 2-bit address into four row-select lines. Each
// storage cell is a transparent latch (C, D): its D input is the data_in bit
// of its column and its C input is the AND of its row-select line and the
// inverted read/write' line, so while rw is low the selected row follows
// data_in and it keeps that value when rw rises. For reading, each cell's
// output is ANDed with its row-select line and the results of a column are
// ORed into that column's data_out bit (the chain starts from 0). The
// whole circuit is asynchronous: no clock, no enable. The organisation,
// the latch cells and the AND/OR read path are those of the design; the
// assignment of data_in[3] to the leftmost column is this implementation's
// reading.
module ram4x4 (
  input  logic [1:0] address,
  input  logic       rw,        // read/write': 1 = read, 0 = write
  input  logic [3:0] data_in,
  output logic [3:0] data_out
);

  logic [3:0] row;              // row-select lines
  logic [3:0] wr_row;           // latch clock per row: row AND NOT rw
  logic [3:0] store [4];        // store[r][c]

  always_comb begin
    row = '0;
    row[address] = 1'b1;
  end

  assign wr_row = row & {4{~rw}};

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      always_latch begin
        if (wr_row[r]) store[r][c] = data_in[c];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      data_out[c] = 1'b0;
      for (int r = 0; r < 4; r++)
        data_out[c] = data_out[c] | (store[r][c] & row[r]);
    end
  end

endmodule
