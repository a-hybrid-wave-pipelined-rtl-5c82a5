// search_argument_register -- input register of the router.
//
// On a clock edge with `load` high it latches the destination address of
// a new search and raises `valid`; with `load` low it empties, so each
// address is searched exactly once. While it holds a search it drives the
// BIT_COMPARE lines with the address and the NBIT_COMPARE lines with its
// inverse. While it is empty both lines of every bit are low, so no DCAM
// cell can flag a mismatch (this idle state is this design's choice).
// Outputs change only at the clock edge.
module search_argument_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] dest_addr,
  output logic             valid,
  output logic [WIDTH-1:0] addr_q,
  output logic [WIDTH-1:0] bit_compare,
  output logic [WIDTH-1:0] nbit_compare
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      addr_q <= '0;
    end else begin
      valid <= load;
      if (load) addr_q <= dest_addr;
    end
  end

  always_comb begin
    bit_compare  = valid ?  addr_q : '0;
    nbit_compare = valid ? ~addr_q : '0;
  end

endmodule
