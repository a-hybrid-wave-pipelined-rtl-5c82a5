// dcam_array -- the bit-pattern associative unit: ROWS words of WIDTH
// ternary DCAM cells.
//
// Line sharing follows the router's CAM organisation. Per word: a write
// line (wr_row), a read line (rd_row), the evaluate line and a match line.
// Per bit column, across all words: the store lines (BIT_STORE to Sb1,
// NBIT_STORE to Sb0) and the compare lines (BIT_COMPARE, NBIT_COMPARE).
//
// Matching: a match line is precharged high and is pulled low only while
// evaluate is high and at least one cell of the word mismatches, so
// match_line[r] = !(evaluate & |mismatch[r]). With evaluate low every line
// reads as a match; the selection function ignores them until pass.
// Combinational from the compare lines and evaluate to match_line.
//
// Read: the selected word's Sb1/Sb0 appear on rd_sb1/rd_sb0 in the same
// cycle (the OR of the words if several read lines are high, as on shared
// bit lines). Write: the words whose write line is high load the store
// lines at the clock edge. Read and write of one row in one cycle is a
// refresh (the old value is read, the same value is written back).
module dcam_array #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROWS-1:0]  wr_row,
  input  logic [ROWS-1:0]  rd_row,
  input  logic [WIDTH-1:0] store_sb1,
  input  logic [WIDTH-1:0] store_sb0,
  output logic [WIDTH-1:0] rd_sb1,
  output logic [WIDTH-1:0] rd_sb0,
  input  logic [WIDTH-1:0] bit_compare,
  input  logic [WIDTH-1:0] nbit_compare,
  input  logic             evaluate,
  output logic [ROWS-1:0]  match_line
);

  logic [WIDTH-1:0] sb1      [ROWS];
  logic [WIDTH-1:0] sb0      [ROWS];
  logic [WIDTH-1:0] mismatch [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_word
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      dcam_cell u_cell (
        .clk          (clk),
        .rst_n        (rst_n),
        .write        (wr_row[r]),
        .bit_store    (store_sb1[b]),
        .nbit_store   (store_sb0[b]),
        .bit_compare  (bit_compare[b]),
        .nbit_compare (nbit_compare[b]),
        .sb1          (sb1[r][b]),
        .sb0          (sb0[r][b]),
        .mismatch     (mismatch[r][b])
      );
    end
    // precharged match line, discharged through T_m and T_e
    assign match_line[r] = !(evaluate && (|mismatch[r]));
  end

  always_comb begin
    rd_sb1 = '0;
    rd_sb0 = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (rd_row[r]) begin
        rd_sb1 |= sb1[r];
        rd_sb0 |= sb0[r];
      end
    end
  end

endmodule
