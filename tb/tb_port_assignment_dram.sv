// tb_port_assignment_dram -- writes random words through the access port,
// reads them back, reads them through single DRAM pointers and through
// several pointers at once (the result must be the OR of the rows), and
// checks a pointer-less read gives 0.
module tb_port_assignment_dram;
  localparam int unsigned ROWS = 16, PW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0] sel_row = '0, acc_row = '0;
  logic acc_we = 1'b0;
  logic [PW-1:0] acc_wdata = '0, acc_rdata, sel_data;
  int checks = 0, failures = 0;

  port_assignment_dram #(.ROWS(ROWS), .PORT_W(PW)) dut (.*);

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

  logic [PW-1:0] ref_mem [ROWS];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      ref_mem[r] = PW'($urandom);
      @(negedge clk);
      acc_row = ROWS'(1) << r;
      acc_we = 1'b1;
      acc_wdata = ref_mem[r];
    end
    @(negedge clk);
    acc_we = 1'b0;
    acc_wdata = '1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      acc_row = ROWS'(1) << r;
      sel_row = ROWS'(1) << r;
      #1;
      check(32'(acc_rdata), 32'(ref_mem[r]), $sformatf("access read row %0d", r));
      check(32'(sel_data),  32'(ref_mem[r]), $sformatf("pointer read row %0d", r));
    end
    acc_row = '0;
    sel_row = '0;
    #1;
    check(32'(sel_data), 32'h0, "no pointer");
    for (int n = 0; n < 200; n++) begin
      logic [PW-1:0] exp;
      sel_row = ROWS'($urandom);
      exp = '0;
      for (int r = 0; r < ROWS; r++) if (sel_row[r]) exp |= ref_mem[r];
      #1;
      check(32'(sel_data), 32'(exp), $sformatf("wired OR of %h", sel_row));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
