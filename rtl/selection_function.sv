// selection_function -- priority selection between the DCAM match lines
// and the port-assignment DRAM.
//
// Entry 0 has the highest priority. Each entry i has a priority status
// P_i that is 1 when no entry above it matched; its encoded priority is
// EP_i = match_i & P_i, so at most one EP_i is high and the result is
// deterministic for a given address and pattern set.
//
// Priority lookahead: the entries are split into groups of GROUP. Each
// group's "any match" is formed in parallel, and a group's priority is the
// NOR of the "any match" of all groups above it, so the status of the last
// entry does not ripple through every entry above it; inside a group the
// status ripples entry by entry. (The lookahead circuit itself is not
// given by the router's description; this two-level form is this
// design's.)
//
// The match lines are meaningful only while `pass` is high. enable_i,
// which guards the DRAM pointer of entry i against a false start, is high
// only then, and dram_select_i = EP_i & enable_i. no_match is high when
// pass is high and no entry matched. sel_row is the number of the selected
// entry (0 when none). All outputs are combinational.
module selection_function #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned GROUP = 4,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned NG = (ROWS + GROUP - 1) / GROUP
) (
  input  logic [ROWS-1:0] match_line,
  input  logic            pass,
  output logic [ROWS-1:0] ep,
  output logic [ROWS-1:0] enable,
  output logic [ROWS-1:0] dram_select,
  output logic            no_match,
  output logic [AW-1:0]   sel_row
);

  logic [NG-1:0]   grp_any;   // some entry of the group matches
  logic [NG-1:0]   grp_pri;   // no group above this one matches
  logic [ROWS-1:0] pri;       // P_i

  always_comb begin
    grp_any = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (match_line[i]) grp_any[i / GROUP] = 1'b1;
  end

  // lookahead: every group's priority from the group "any" flags directly
  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      grp_pri[g] = 1'b1;
      for (int unsigned h = 0; h < g; h++)
        if (grp_any[h]) grp_pri[g] = 1'b0;
    end
  end

  // ripple inside each group
  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++) begin
      if (i % GROUP == 0) pri[i] = grp_pri[i / GROUP];
      else                pri[i] = pri[i-1] & ~match_line[i-1];
    end
  end

  always_comb begin
    ep          = match_line & pri;
    enable      = {ROWS{pass}};
    dram_select = ep & enable;
    no_match    = pass & ~(|match_line);
    sel_row     = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (ep[i]) sel_row = AW'(i);
  end

endmodule
