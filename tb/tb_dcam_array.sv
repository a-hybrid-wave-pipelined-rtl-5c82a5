// tb_dcam_array -- bit-pattern associative unit at 16 words x 8 bits.
// Programs random ternary patterns through the write lines and store lines,
// reads every word back through the read lines, then searches random
// addresses (and addresses built to hit one word) and compares every match
// line with a reference ternary comparison. With evaluate low every match
// line must stay high (precharged). Also checks a refresh (read and write
// back of one row in one cycle) keeps the word.
module tb_dcam_array;
  import bpar_pkg::*;
  localparam int unsigned ROWS = 16, W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0] wr_row = '0, rd_row = '0, match_line;
  logic [W-1:0] store_sb1 = '0, store_sb0 = '0, rd_sb1, rd_sb0;
  logic [W-1:0] bit_compare = '0, nbit_compare = '0;
  logic evaluate = 1'b0;
  int checks = 0, failures = 0;
  int hits = 0;

  dcam_array #(.ROWS(ROWS), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [W-1:0] value [ROWS];
  logic [W-1:0] care  [ROWS];

  function automatic logic [ROWS-1:0] ref_match(logic [W-1:0] a);
    for (int r = 0; r < ROWS; r++)
      ref_match[r] = ((a ^ value[r]) & care[r]) == '0;
  endfunction

  task automatic search(input logic [W-1:0] a, input logic ev);
    @(negedge clk);
    bit_compare = a;
    nbit_compare = ~a;
    evaluate = ev;
    #1;
    check(32'(match_line), ev ? 32'(ref_match(a)) : 32'(16'hffff), $sformatf("match lines for %h ev=%0b", a, ev));
    if (ev && ref_match(a) != '0) hits++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // program
    for (int r = 0; r < ROWS; r++) begin
      value[r] = W'($urandom);
      care[r]  = W'($urandom) | W'($urandom);
      @(negedge clk);
      wr_row = ROWS'(1) << r;
      for (int b = 0; b < W; b++)
        {store_sb1[b], store_sb0[b]} = tern_encode(care[r][b], value[r][b]);
    end
    @(negedge clk);
    wr_row = '0;
    store_sb1 = '1;  // must not be written anywhere
    store_sb0 = '0;
    // read back
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      rd_row = ROWS'(1) << r;
      #1;
      check(32'(rd_sb1), 32'(care[r] & ~value[r]), $sformatf("read Sb1 row %0d", r));
      check(32'(rd_sb0), 32'(care[r] &  value[r]), $sformatf("read Sb0 row %0d", r));
    end
    @(negedge clk);
    rd_row = '0;
    // refresh row 5: read and write back in one cycle
    @(negedge clk);
    rd_row = ROWS'(1) << 5;
    wr_row = ROWS'(1) << 5;
    #1;
    store_sb1 = rd_sb1;
    store_sb0 = rd_sb0;
    @(negedge clk);
    rd_row = '0;
    wr_row = '0;
    // searches
    for (int n = 0; n < 400; n++) search(W'($urandom), 1'b1);
    for (int r = 0; r < ROWS; r++) search(value[r] ^ (W'($urandom) & ~care[r]), 1'b1);
    for (int n = 0; n < 20; n++) search(W'($urandom), 1'b0);
    checks++;
    if (hits < ROWS) begin
      failures++;
      $display("FAIL too few matching searches: %0d", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
