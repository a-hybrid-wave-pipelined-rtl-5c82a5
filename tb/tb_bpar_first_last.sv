// tb_bpar_first_last -- the router's critical priority case, at default
// size: the last word (15) matches every address, the first word (0)
// matches every other address, and words 1..14 never win because their
// patterns are never offered. On the cycles where both match, the first
// word's priority must block the last word's DRAM pointer. Searches are
// issued back to back; the port words must alternate between those of word
// 0 and word 15, one result per clock, each two edges after its address.
module tb_bpar_first_last;
  import bpar_pkg::*;
  localparam int unsigned W = 8, PW = 4, N = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  bpar_mode_t mode_i = MODE_PROGRAM, mode_o;
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

  int checks = 0, failures = 0, n_first = 0, n_last = 0, n_both = 0;

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
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // word 0: addresses with bit 7 set; words 1..14: bit 7 clear and
    // bits 6..0 all set (never offered); word 15: everything
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      prog_we = 1'b1;
      prog_row = 4'(r);
      prog_port = PW'(r);
      if (r == 0)       begin prog_value = 8'h80; prog_care = 8'h80; end
      else if (r == 15) begin prog_value = 8'h00; prog_care = 8'h00; end
      else              begin prog_value = 8'h7f; prog_care = 8'hff; end
    end
    @(negedge clk);
    prog_we = 1'b0;
    mode_i = MODE_NORMAL;
    for (int k = 0; k < N + 2; k++) begin
      // address k: bit 7 set on even k, low bits never all ones
      search_valid = (k < N);
      dest_addr = {k[0] == 1'b0, 7'(k % 100)};
      if (k >= 2) begin
        // result of search k-2, registered at the edge just passed
        bit first;
        first = ((k - 2) % 2 == 0);
        check(32'(out_valid), 1, "one result per clock");
        check(32'(out_no_match), 0, "match");
        check(32'(out_row), first ? 0 : 15, "winning word");
        check(32'(out_port), first ? 0 : 15, "port word");
        if (first) begin n_first++; n_both++; end else n_last++;
      end
      @(negedge clk);
    end
    check(32'(n_both >= N / 2 - 1), 1, "first and last matched together");
    $display("first=%0d last=%0d", n_first, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
