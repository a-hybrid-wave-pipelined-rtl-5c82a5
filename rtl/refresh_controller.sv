// refresh_controller -- background refresh sequencer for one dynamic
// memory of the router (one instance for the DCAM, one for the DRAM).
//
// A timer counts REFRESH_INTERVAL cycles; at its end a refresh of the next
// row becomes pending. A pending refresh is carried out in the first cycle
// in which the store lines are not busy with programming: `refresh` is
// high for that one cycle with the row on refresh_addr, the memory reads
// the row and writes it back, and the row counter advances round robin.
// At most one refresh is pending: a timer expiry while one waits adds
// nothing. force_req (refresh mode) makes a refresh pending every cycle,
// so the rows are refreshed back to back. Searches are never held up:
// refresh uses the store lines, searching uses the compare lines.
// The interval and the deferral rule are this design's choices.
module refresh_controller #(
  parameter int unsigned ROWS             = 16,
  parameter int unsigned REFRESH_INTERVAL = 32,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned TW = (REFRESH_INTERVAL > 1) ? $clog2(REFRESH_INTERVAL) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          busy,
  input  logic          force_req,
  output logic          refresh,
  output logic [AW-1:0] refresh_addr,
  output logic          pending
);

  logic [TW-1:0] timer;
  logic          expire;

  always_comb begin
    expire  = (timer == TW'(REFRESH_INTERVAL - 1));
    refresh = pending & ~busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer        <= '0;
      pending      <= 1'b0;
      refresh_addr <= '0;
    end else begin
      timer   <= expire ? '0 : timer + 1'b1;
      pending <= (pending & ~refresh) | expire | force_req;
      if (refresh)
        refresh_addr <= (refresh_addr == AW'(ROWS - 1)) ? '0 : refresh_addr + 1'b1;
    end
  end

endmodule
