// bpar_router -- bit-pattern associative router (BPAR), top level.
//
// A router decides, for each message, which output port it leaves by.
// Here the routing algorithm is not fixed logic but a table of ternary
// bit patterns: each of ROWS words compares the destination address bit
// by bit, with don't-care bits where the routing decision does not depend
// on the bit, and carries a port-assignment word. Reprogramming the table
// changes the routing algorithm or the topology.
//
// Datapath, one search:
//   search_argument_register -> dcam_array (condition match, all words in
//   parallel) -> selection_function (first matching word wins) ->
//   port_assignment_dram (word of the winner) -> port_assignment_register
// Only the first and the last are registers; the three stages between
// them are combinational, as in the wave-pipelined original, where the
// stages are separated by timing rather than by latches.
//
// Timing: an address offered with search_valid while search_ready is high
// is latched at clock edge k; the result (out_port, out_no_match, out_row)
// is latched at edge k+1 and out_valid is high for the cycle after it.
// A new address can be accepted every cycle.
//
// Programming (mode_i = MODE_PROGRAM, prog_we): row prog_row receives the
// pattern (prog_value where prog_care is 1, don't care elsewhere) and the
// port word prog_port at the clock edge. Searches are refused meanwhile.
//
// Refresh: one refresh controller per memory reads a row and writes it
// back every REFRESH_INTERVAL cycles, round robin, through that memory's
// row select and store lines; searches continue meanwhile. Programming
// defers a refresh; MODE_REFRESH refreshes a row every cycle.
//
// Word 0 has the highest priority. Reset clears every pattern to all
// don't care and every port word to 0, so the table must be programmed
// before use. Widths, interval and reset are this design's choices; the
// 16-word table size is the original's.
module bpar_router
  import bpar_pkg::*;
#(
  parameter int unsigned ROWS             = 16,
  parameter int unsigned WIDTH            = 8,
  parameter int unsigned PORT_W           = 4,
  parameter int unsigned GROUP            = 4,
  parameter int unsigned REFRESH_INTERVAL = 32,
  localparam int unsigned AW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bpar_mode_t        mode_i,
  // search
  input  logic              search_valid,
  input  logic [WIDTH-1:0]  dest_addr,
  output logic              search_ready,
  // programming
  input  logic              prog_we,
  input  logic [AW-1:0]     prog_row,
  input  logic [WIDTH-1:0]  prog_value,
  input  logic [WIDTH-1:0]  prog_care,
  input  logic [PORT_W-1:0] prog_port,
  // result
  output logic              out_valid,
  output logic [PORT_W-1:0] out_port,
  output logic              out_no_match,
  output logic [AW-1:0]     out_row,
  // status
  output bpar_mode_t        mode_o,
  output logic              refresh_active,
  output logic              refresh_pending
);

  // control
  logic sar_load, sar_valid, evaluate, pass, par_load;
  logic prog_write, store_busy, force_refresh;
  // refresh
  logic          rf_cam, rf_dram, rf_cam_pend, rf_dram_pend;
  logic [AW-1:0] rf_cam_addr, rf_dram_addr;
  // DCAM
  logic [WIDTH-1:0] addr_q, bit_compare, nbit_compare;
  logic [ROWS-1:0]  cam_row, cam_rd_row, match_line;
  logic [WIDTH-1:0] store_sb1, store_sb0, rd_sb1, rd_sb0;
  logic [WIDTH-1:0] prog_sb1, prog_sb0;
  // selection function
  logic [ROWS-1:0]  ep, sf_enable, dram_select;
  logic             no_match;
  logic [AW-1:0]    sel_row;
  // DRAM
  logic [ROWS-1:0]   dram_row;
  logic [PORT_W-1:0] sel_data, dram_rdata, dram_wdata;

  bpar_control u_ctrl (
    .mode_i        (mode_i),
    .search_valid  (search_valid),
    .sar_valid     (sar_valid),
    .prog_we       (prog_we),
    .refresh       (refresh_active),
    .search_ready  (search_ready),
    .sar_load      (sar_load),
    .evaluate      (evaluate),
    .pass          (pass),
    .par_load      (par_load),
    .prog_write    (prog_write),
    .store_busy    (store_busy),
    .force_refresh (force_refresh),
    .mode_o        (mode_o)
  );

  search_argument_register #(.WIDTH(WIDTH)) u_sar (
    .clk          (clk),
    .rst_n        (rst_n),
    .load         (sar_load),
    .dest_addr    (dest_addr),
    .valid        (sar_valid),
    .addr_q       (addr_q),
    .bit_compare  (bit_compare),
    .nbit_compare (nbit_compare)
  );

  // ---- DCAM: programming and refresh share the row select and store lines
  refresh_controller #(.ROWS(ROWS), .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_rf_cam (
    .clk          (clk),
    .rst_n        (rst_n),
    .busy         (store_busy),
    .force_req    (force_refresh),
    .refresh      (rf_cam),
    .refresh_addr (rf_cam_addr),
    .pending      (rf_cam_pend)
  );

  row_select #(.ROWS(ROWS)) u_rs_cam (
    .en   (prog_write || rf_cam),
    .addr (prog_write ? prog_row : rf_cam_addr),
    .row  (cam_row)
  );

  always_comb begin
    for (int unsigned b = 0; b < WIDTH; b++)
      {prog_sb1[b], prog_sb0[b]} = tern_encode(prog_care[b], prog_value[b]);
    cam_rd_row = prog_write ? '0 : cam_row;
    store_sb1  = prog_write ? prog_sb1 : rd_sb1;
    store_sb0  = prog_write ? prog_sb0 : rd_sb0;
  end

  dcam_array #(.ROWS(ROWS), .WIDTH(WIDTH)) u_dcam (
    .clk          (clk),
    .rst_n        (rst_n),
    .wr_row       (cam_row),
    .rd_row       (cam_rd_row),
    .store_sb1    (store_sb1),
    .store_sb0    (store_sb0),
    .rd_sb1       (rd_sb1),
    .rd_sb0       (rd_sb0),
    .bit_compare  (bit_compare),
    .nbit_compare (nbit_compare),
    .evaluate     (evaluate),
    .match_line   (match_line)
  );

  selection_function #(.ROWS(ROWS), .GROUP(GROUP)) u_sf (
    .match_line  (match_line),
    .pass        (pass),
    .ep          (ep),
    .enable      (sf_enable),
    .dram_select (dram_select),
    .no_match    (no_match),
    .sel_row     (sel_row)
  );

  // ---- DRAM
  refresh_controller #(.ROWS(ROWS), .REFRESH_INTERVAL(REFRESH_INTERVAL)) u_rf_dram (
    .clk          (clk),
    .rst_n        (rst_n),
    .busy         (store_busy),
    .force_req    (force_refresh),
    .refresh      (rf_dram),
    .refresh_addr (rf_dram_addr),
    .pending      (rf_dram_pend)
  );

  row_select #(.ROWS(ROWS)) u_rs_dram (
    .en   (prog_write || rf_dram),
    .addr (prog_write ? prog_row : rf_dram_addr),
    .row  (dram_row)
  );

  always_comb dram_wdata = prog_write ? prog_port : dram_rdata;

  port_assignment_dram #(.ROWS(ROWS), .PORT_W(PORT_W)) u_dram (
    .clk       (clk),
    .rst_n     (rst_n),
    .sel_row   (dram_select),
    .sel_data  (sel_data),
    .acc_row   (dram_row),
    .acc_we    (prog_write || rf_dram),
    .acc_wdata (dram_wdata),
    .acc_rdata (dram_rdata)
  );

  port_assignment_register #(.PORT_W(PORT_W), .ROWS(ROWS)) u_par (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (par_load),
    .port_in     (sel_data),
    .no_match_in (no_match),
    .row_in      (sel_row),
    .valid       (out_valid),
    .port_q      (out_port),
    .no_match_q  (out_no_match),
    .row_q       (out_row)
  );

  always_comb begin
    refresh_active  = rf_cam || rf_dram;
    refresh_pending = rf_cam_pend || rf_dram_pend;
  end

endmodule
