// tb_search_argument_register -- checks that a loaded address appears on
// the compare lines (and its inverse on the inverse lines) after the clock
// edge, that the register empties when not loaded, and that empty compare
// lines are all low.
module tb_search_argument_register;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] dest_addr = '0;
  logic valid;
  logic [W-1:0] addr_q, bit_compare, nbit_compare;
  int checks = 0, failures = 0;

  search_argument_register #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W:0] got, input logic [W:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [W-1:0] a;
  logic         l;
  logic         exp_valid;
  logic [W-1:0] exp_addr;

  initial begin
    exp_valid = 1'b0;
    exp_addr  = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      l = ($urandom_range(0, 3) != 0);
      a = W'($urandom);
      load = l;
      dest_addr = a;
      @(posedge clk);
      exp_valid = l;
      if (l) exp_addr = a;
      @(negedge clk);
      check({8'h0, valid}, {8'h0, exp_valid}, "valid");
      check({1'b0, bit_compare},  {1'b0, exp_valid ?  exp_addr : 8'h00}, "bit_compare");
      check({1'b0, nbit_compare}, {1'b0, exp_valid ? ~exp_addr : 8'h00}, "nbit_compare");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
