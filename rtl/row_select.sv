// row_select -- row decoder beside each BPAR memory.
//
// Turns a binary row address into one-hot word lines while `en` is high;
// all lines are low otherwise, and an address of ROWS or more selects no
// row. Purely combinational. It drives the write and read lines of the
// DCAM and of the port-assignment DRAM for programming and refresh.
module row_select #(
  parameter int unsigned ROWS = 16,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [ROWS-1:0] row
);

  always_comb begin
    row = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (en && addr == AW'(r)) row[r] = 1'b1;
  end

endmodule
