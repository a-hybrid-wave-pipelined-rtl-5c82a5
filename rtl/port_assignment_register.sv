// port_assignment_register -- output register of the router.
//
// At the clock edge that ends a search (`load` high) it latches the port
// word read from the DRAM, the no-match flag and the number of the winning
// row, and raises `valid` for one cycle. The port word of a search with no
// match is 0, since no DRAM row is then selected. With `load` low the
// data is held and valid falls. Outputs change only at the clock edge.
module port_assignment_register #(
  parameter int unsigned PORT_W = 4,
  parameter int unsigned ROWS   = 16,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [PORT_W-1:0] port_in,
  input  logic              no_match_in,
  input  logic [AW-1:0]     row_in,
  output logic              valid,
  output logic [PORT_W-1:0] port_q,
  output logic              no_match_q,
  output logic [AW-1:0]     row_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid      <= 1'b0;
      port_q     <= '0;
      no_match_q <= 1'b0;
      row_q      <= '0;
    end else begin
      valid <= load;
      if (load) begin
        port_q     <= port_in;
        no_match_q <= no_match_in;
        row_q      <= row_in;
      end
    end
  end

endmodule
