// port_assignment_dram -- memory of output-port words, one per DCAM word.
//
// Search read: every row whose DRAM pointer (sel_row) is high is read and
// the result is the bit-wise OR of those rows, as on precharged bit lines
// discharged by any selected cell; with no pointer high the result is 0.
// The selection function raises at most one pointer, so normally this is
// the word of the winning pattern. Combinational from sel_row.
//
// Access port: acc_row (one-hot, from a row decoder) reads a row onto
// acc_rdata in the same cycle and, with acc_we, writes acc_wdata into it
// at the clock edge. Programming writes new data; refresh writes back what
// it read. The dynamic cells of the original memory are flip-flops here.
module port_assignment_dram #(
  parameter int unsigned ROWS   = 16,
  parameter int unsigned PORT_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ROWS-1:0]   sel_row,
  output logic [PORT_W-1:0] sel_data,
  input  logic [ROWS-1:0]   acc_row,
  input  logic              acc_we,
  input  logic [PORT_W-1:0] acc_wdata,
  output logic [PORT_W-1:0] acc_rdata
);

  logic [PORT_W-1:0] mem [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) mem[r] <= '0;
    end else if (acc_we) begin
      for (int unsigned r = 0; r < ROWS; r++)
        if (acc_row[r]) mem[r] <= acc_wdata;
    end
  end

  always_comb begin
    sel_data  = '0;
    acc_rdata = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (sel_row[r]) sel_data  |= mem[r];
      if (acc_row[r]) acc_rdata |= mem[r];
    end
  end

endmodule
