// tb_selection_function -- random and directed match-line vectors against
// a reference priority choice (first set line wins). Checks EP, the DRAM
// pointers with and without pass, no_match and the selected row, including
// the case of the first and last entries matching together.
module tb_selection_function;
  localparam int unsigned ROWS = 16;
  logic [ROWS-1:0] match_line, ep, enable, dram_select;
  logic pass, no_match;
  logic [3:0] sel_row;
  int checks = 0, failures = 0;

  selection_function #(.ROWS(ROWS), .GROUP(4)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (match %h pass %0b)", what, got, exp, match_line, pass);
    end
  endtask

  task automatic apply(input logic [ROWS-1:0] m, input logic p);
    logic [ROWS-1:0] first;
    int idx;
    first = '0;
    idx = -1;
    for (int i = 0; i < ROWS; i++)
      if (m[i] && idx < 0) idx = i;
    if (idx >= 0) first[idx] = 1'b1;
    match_line = m;
    pass = p;
    #1;
    check(32'(ep), 32'(first), "ep");
    check(32'(dram_select), p ? 32'(first) : 32'h0, "dram_select");
    check(32'(enable), p ? 32'(16'hffff) : 32'h0, "enable");
    check(32'(no_match), 32'(p && m == '0), "no_match");
    if (idx >= 0) check(32'(sel_row), 32'(idx), "sel_row");
  endtask

  initial begin
    apply(16'h8001, 1'b1);   // first and last together
    apply(16'h8000, 1'b1);
    apply(16'h0000, 1'b1);
    apply(16'h0000, 1'b0);
    apply(16'hffff, 1'b0);
    for (int i = 0; i < ROWS; i++) apply(16'h1 << i, 1'b1);
    for (int i = 0; i < ROWS; i++) apply(16'hffff << i, 1'b1);
    for (int n = 0; n < 2000; n++) begin
      logic [ROWS-1:0] m;
      m = 16'($urandom) & 16'($urandom) & 16'($urandom);
      apply(m, $urandom_range(0, 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
