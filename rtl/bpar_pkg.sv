// bpar_pkg -- types shared by the bit-pattern associative router (BPAR).
//
// A BPAR word stores one ternary digit per address bit in two storage
// nodes, Sb1 and Sb0. The code below is the router's stored-data table:
// 00 = don't care, 01 = one, 10 = zero, 11 = not allowed. A search bit
// mismatches a cell when the cell holds "zero" and the bit is 1, or holds
// "one" and the bit is 0; a don't-care cell never mismatches.
//
// The operation-mode enum covers the router's three modes: normal
// (matching), programming (data loading) and refreshing. Its encoding is
// this design's choice.
package bpar_pkg;

  // {Sb1, Sb0} as stored in a DCAM cell
  typedef enum logic [1:0] {
    TERN_X    = 2'b00,  // don't care
    TERN_ONE  = 2'b01,
    TERN_ZERO = 2'b10,
    TERN_BAD  = 2'b11   // not allowed
  } ternary_t;

  typedef enum logic [1:0] {
    MODE_NORMAL  = 2'd0,
    MODE_PROGRAM = 2'd1,
    MODE_REFRESH = 2'd2
  } bpar_mode_t;

  // Ternary code for one pattern bit: care=0 gives don't care.
  function automatic ternary_t tern_encode(input logic care, input logic value);
    if (!care)     return TERN_X;
    else if (value) return TERN_ONE;
    else           return TERN_ZERO;
  endfunction

endpackage
