// dcam_cell -- one ternary cell of the bit-pattern associative unit.
//
// The cell keeps a ternary digit in two storage nodes, Sb1 and Sb0
// (bpar_pkg::ternary_t: 00 don't care, 01 one, 10 zero). While its word's
// write line is high, the clock edge loads Sb1 from BIT_STORE and Sb0 from
// NBIT_STORE. The stored nodes are always visible on sb1/sb0; the array
// puts them on the store lines when the word's read line is high.
//
// Comparison is an exclusive-OR between the stored digit and the compare
// lines: Sb1 (stored zero) with BIT_COMPARE, Sb0 (stored one) with
// NBIT_COMPARE. `mismatch` is the cell's pull-down request on the word's
// precharged match line; the array discharges the line only while evaluate
// is high. mismatch is combinational, the storage changes on the clock.
//
// The storage nodes of the original cell are dynamic; here they are flip-
// flops, so refresh (read and rewrite) leaves the value unchanged. Reset
// to don't care is this design's choice.
module dcam_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic write,
  input  logic bit_store,
  input  logic nbit_store,
  input  logic bit_compare,
  input  logic nbit_compare,
  output logic sb1,
  output logic sb0,
  output logic mismatch
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb1 <= 1'b0;
      sb0 <= 1'b0;
    end else if (write) begin
      sb1 <= bit_store;
      sb0 <= nbit_store;
    end
  end

  always_comb mismatch = (sb1 & bit_compare) | (sb0 & nbit_compare);

  // The code 11 is not a legal stored value.
  a_no_bad_code: assert property (@(posedge clk) disable iff (!rst_n)
                                  write |-> !(bit_store && nbit_store))
    else $error("dcam_cell: write of the not-allowed code 11");

endmodule
