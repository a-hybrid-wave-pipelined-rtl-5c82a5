// tb_port_assignment_register -- random loads: after each edge the outputs
// must hold the last loaded result, and valid must follow load by one
// clock.
module tb_port_assignment_register;
  localparam int unsigned PW = 4, ROWS = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, no_match_in = 1'b0;
  logic [PW-1:0] port_in = '0, port_q;
  logic [3:0] row_in = '0, row_q;
  logic valid, no_match_q;
  int checks = 0, failures = 0;

  port_assignment_register #(.PORT_W(PW), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  logic [PW-1:0] e_port = '0;
  logic [3:0] e_row = '0;
  logic e_nm = 1'b0, e_valid = 1'b0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) != 0);
      port_in = PW'($urandom);
      row_in = 4'($urandom);
      no_match_in = $urandom_range(0, 1);
      @(posedge clk);
      e_valid = load;
      if (load) begin
        e_port = port_in;
        e_row = row_in;
        e_nm = no_match_in;
      end
      @(negedge clk);
      check(32'(valid), 32'(e_valid), "valid");
      check(32'(port_q), 32'(e_port), "port");
      check(32'(row_q), 32'(e_row), "row");
      check(32'(no_match_q), 32'(e_nm), "no_match");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
