// tb_refresh_controller -- refresh sequencing at 16 rows and a 32-cycle
// interval. Phase 1, never busy: a refresh every 32 cycles, rows in round
// robin order. Phase 2, random busy: a refresh never happens while busy,
// a due refresh waits for the first free cycle, no refresh is lost or
// doubled. Phase 3, force_req: a refresh every free cycle. Each cycle is
// compared with a reference model; counts of each situation are checked.
module tb_refresh_controller;
  localparam int unsigned ROWS = 16, IV = 32;
  logic clk = 1'b0, rst_n = 1'b0, busy = 1'b0, force_req = 1'b0;
  logic refresh, pending;
  logic [3:0] refresh_addr;
  int checks = 0, failures = 0;
  int n_refresh = 0, n_deferred = 0, n_forced = 0;

  refresh_controller #(.ROWS(ROWS), .REFRESH_INTERVAL(IV)) dut (.*);

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
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // reference model
  int cyc = 0;          // clock edges since reset release
  bit due = 0;          // a refresh is owed
  int next_row = 0;
  int last_refresh = -1;
  int phase = 1;

  always @(negedge clk) if (rst_n) begin
    logic exp_refresh;
    exp_refresh = due && !busy;
    check(32'(refresh), 32'(exp_refresh), "refresh");
    check(32'(pending), 32'(due), "pending");
    if (refresh) begin
      check(32'(refresh_addr), 32'(next_row), "refresh row");
      if (phase == 1 && last_refresh >= 0) check(32'(cyc - last_refresh), IV, "interval");
      last_refresh = cyc;
      n_refresh++;
      if (force_req) n_forced++;
    end
    if (due && busy) n_deferred++;
  end

  always @(posedge clk) if (rst_n) begin
    bit fired;
    fired = due && !busy;
    cyc++;
    if (fired) next_row = (next_row + 1) % ROWS;
    due = (due && !fired) || (cyc % IV == 0) || force_req;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (IV * ROWS * 2 + 5) @(negedge clk);
    check(32'(n_refresh >= 2 * ROWS), 1, "phase 1 refresh count");
    phase = 2;
    repeat (3000) begin
      @(negedge clk);
      busy = ($urandom_range(0, 2) == 0) || ($urandom_range(0, 40) == 0 ? 1'b1 : 1'b0);
      if ($urandom_range(0, 50) == 0) repeat ($urandom_range(30, 80)) begin
        busy = 1'b1;
        @(negedge clk);
      end
    end
    phase = 3;
    @(negedge clk);
    busy = 1'b0;
    force_req = 1'b1;
    repeat (40) @(negedge clk);
    force_req = 1'b0;
    repeat (5) @(negedge clk);
    check(32'(n_deferred > 0), 1, "a refresh was deferred");
    check(32'(n_forced >= 30), 1, "forced refreshes");
    $display("refreshes=%0d deferred-cycles=%0d forced=%0d", n_refresh, n_deferred, n_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
