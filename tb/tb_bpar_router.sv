// tb_bpar_router -- end-to-end test of the router at its default size
// (16 words, 8-bit addresses, 4-bit port words).
//
// Phase 1 programs an e-cube routing table for node C of an 8-dimensional
// hypercube: word i (i < 8) matches addresses that agree with C below bit
// i and differ from it at bit i, and sends the message out of port i; word
// 8 matches C itself (port 8, local delivery). Searches are checked against
// the e-cube rule computed directly (lowest differing bit). Phase 2
// switches the routing algorithm at run time: it reprograms all 16 words
// with random, overlapping ternary patterns, so that several words match
// at once and some addresses match none, and checks against a reference
// search of the table. Phase 3 runs searches in refresh mode.
//
// Every accepted search must produce its result exactly two clock edges
// after it was offered (latched at edge k, result registered at edge k+1).
// The test counts each mechanism of the design (match, no match, priority
// between several matches, don't-care bits, back-to-back searches, refusal
// in program mode, background refresh during searches, refresh deferred by
// programming, refresh mode, mode switches) and fails if one never occurs.
module tb_bpar_router;
  import bpar_pkg::*;
  localparam int unsigned ROWS = 16, W = 8, PW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  bpar_mode_t mode_i = MODE_NORMAL, mode_o;
  logic search_valid = 1'b0, search_ready;
  logic [W-1:0] dest_addr = '0;
  logic prog_we = 1'b0;
  logic [3:0] prog_row = '0;
  logic [W-1:0] prog_value = '0, prog_care = '0;
  logic [PW-1:0] prog_port = '0;
  logic out_valid, out_no_match, refresh_active, refresh_pending;
  logic [PW-1:0] out_port;
  logic [3:0] out_row;

  bpar_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_search = 0, n_match = 0, n_nomatch = 0, n_multi = 0, n_dontcare = 0;
  int n_b2b = 0, n_refused = 0, n_rf_search = 0, n_rf_defer = 0, n_rf_forced = 0;
  int n_mode_switch = 0, n_prog = 0, n_ecube = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // ---------------- reference model
  logic [W-1:0]  t_value [ROWS];
  logic [W-1:0]  t_care  [ROWS];
  logic [PW-1:0] t_port  [ROWS];

  typedef struct {
    bit            valid;
    bit            no_match;
    int            row;
    logic [PW-1:0] port;
  } result_t;

  result_t stage1, stage2;     // accepted at the last edge / the edge before
  bit ecube_phase = 0;
  logic [W-1:0] node_c;
  bit accepted_last = 0;
  bpar_mode_t last_mode = MODE_NORMAL;

  function automatic result_t lookup(logic [W-1:0] a);
    result_t r;
    int nm;
    r.valid = 1;
    r.no_match = 1;
    r.row = 0;
    r.port = '0;
    nm = 0;
    for (int i = 0; i < ROWS; i++) begin
      if (((a ^ t_value[i]) & t_care[i]) == '0) begin
        nm++;
        if (r.no_match) begin
          r.no_match = 0;
          r.row = i;
          r.port = t_port[i];
        end
      end
    end
    return r;
  endfunction

  // e-cube rule computed from the addresses, not from the table
  function automatic int ecube_port(logic [W-1:0] c, logic [W-1:0] d);
    for (int i = 0; i < W; i++) if (c[i] != d[i]) return i;
    return W;
  endfunction

  // outputs are checked at the falling edge, the model advances at the rising edge
  always @(negedge clk) if (rst_n) begin
    check(32'(out_valid), 32'(stage2.valid), "out_valid");
    if (stage2.valid) begin
      check(32'(out_no_match), 32'(stage2.no_match), "out_no_match");
      check(32'(out_port), 32'(stage2.port), "out_port");
      if (!stage2.no_match) check(32'(out_row), 32'(stage2.row), "out_row");
    end
    check(32'(search_ready), 32'(mode_i != MODE_PROGRAM), "search_ready");
    if (refresh_active && dut.sar_valid) n_rf_search++;
    if (refresh_pending && mode_o == MODE_PROGRAM && prog_we) n_rf_defer++;
    if (refresh_active && mode_i == MODE_REFRESH) n_rf_forced++;
    if (search_valid && !search_ready) n_refused++;
  end

  always @(posedge clk) if (rst_n) begin
    bit acc;
    stage2 = stage1;
    // programming writes land at this edge; a search accepted at this edge
    // is evaluated against the table as it is after the edge
    if (mode_i == MODE_PROGRAM && prog_we) begin
      t_value[prog_row] = prog_value;
      t_care[prog_row]  = prog_care;
      t_port[prog_row]  = prog_port;
      n_prog++;
    end
    if (mode_i != last_mode) n_mode_switch++;
    last_mode = mode_i;
    acc = search_valid && (mode_i != MODE_PROGRAM);
    stage1 = '{default: 0};
    if (acc) begin
      int nm;
      stage1 = lookup(dest_addr);
      n_search++;
      if (accepted_last) n_b2b++;
      if (stage1.no_match) n_nomatch++;
      else begin
        n_match++;
        if (t_care[stage1.row] != '1) n_dontcare++;
      end
      nm = 0;
      for (int i = 0; i < ROWS; i++) if (((dest_addr ^ t_value[i]) & t_care[i]) == '0) nm++;
      if (nm > 1) n_multi++;
      if (ecube_phase) begin
        n_ecube++;
        check(32'(stage1.row), 32'(ecube_port(node_c, dest_addr)), "e-cube reference");
      end
    end
    accepted_last = acc;
  end

  // ---------------- stimulus
  task automatic program_row(input int r, input logic [W-1:0] v, input logic [W-1:0] c,
                             input logic [PW-1:0] p);
    @(negedge clk);
    mode_i = MODE_PROGRAM;
    prog_we = 1'b1;
    prog_row = 4'(r);
    prog_value = v;
    prog_care = c;
    prog_port = p;
    // a search offered now must be refused
    search_valid = ($urandom_range(0, 3) == 0);
    dest_addr = W'($urandom);
  endtask

  task automatic run_searches(input int n, input bpar_mode_t m, input int gap_pct);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      mode_i = m;
      prog_we = 1'b0;
      search_valid = ($urandom_range(1, 100) > gap_pct);
      if (ecube_phase && $urandom_range(0, 15) == 0) dest_addr = node_c;
      else dest_addr = W'($urandom);
    end
    @(negedge clk);
    search_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < ROWS; i++) begin
      t_value[i] = '0;
      t_care[i] = '0;
      t_port[i] = '0;
    end
    stage1 = '{default: 0};
    stage2 = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // phase 1: e-cube table for node C, written twice to hold the store
    // lines for longer than a refresh interval
    node_c = W'($urandom);
    for (int pass_n = 0; pass_n < 3; pass_n++) begin
      for (int i = 0; i < W; i++) begin
        logic [W-1:0] care;
        care = W'((1 << (i + 1)) - 1);
        program_row(i, node_c ^ W'(1 << i), care, PW'(i));
      end
      program_row(W, node_c, '1, PW'(W));
    end
    ecube_phase = 1;
    run_searches(600, MODE_NORMAL, 20);
    repeat (3) @(negedge clk);
    ecube_phase = 0;

    // phase 2: new routing algorithm: random overlapping table
    for (int i = 0; i < ROWS; i++)
      program_row(i, W'($urandom), W'($urandom) | W'($urandom), PW'($urandom));
    for (int i = 0; i < ROWS; i++)
      program_row(i, W'($urandom), W'($urandom) & (W'($urandom) | W'($urandom)), PW'($urandom));
    run_searches(1500, MODE_NORMAL, 10);

    // phase 3: refresh mode
    run_searches(200, MODE_REFRESH, 10);
    @(negedge clk);
    mode_i = MODE_NORMAL;
    repeat (4) @(negedge clk);

    $display("searches=%0d match=%0d no_match=%0d multi_match=%0d dont_care_win=%0d back_to_back=%0d",
             n_search, n_match, n_nomatch, n_multi, n_dontcare, n_b2b);
    $display("prog_writes=%0d refused=%0d refresh_during_search=%0d refresh_deferred=%0d refresh_mode=%0d mode_switches=%0d ecube=%0d",
             n_prog, n_refused, n_rf_search, n_rf_defer, n_rf_forced, n_mode_switch, n_ecube);
    check(32'(n_match > 0), 1, "a search matched");
    check(32'(n_nomatch > 0), 1, "a search matched nothing");
    check(32'(n_multi > 0), 1, "priority between several matches");
    check(32'(n_dontcare > 0), 1, "a pattern with don't-care bits won");
    check(32'(n_b2b > 0), 1, "back-to-back searches");
    check(32'(n_refused > 0), 1, "a search refused in program mode");
    check(32'(n_rf_search > 0), 1, "refresh during a search");
    check(32'(n_rf_defer > 0), 1, "refresh deferred by programming");
    check(32'(n_rf_forced > 0), 1, "refresh mode");
    check(32'(n_mode_switch > 0), 1, "mode switch");
    check(32'(n_ecube > 0), 1, "e-cube searches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
