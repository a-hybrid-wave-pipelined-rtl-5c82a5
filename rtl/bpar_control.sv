// bpar_control -- mode and strobe controller of the router.
//
// Modes (bpar_pkg::bpar_mode_t): in MODE_NORMAL searches are accepted one
// per cycle and the memories are refreshed in the background; in
// MODE_PROGRAM searches are refused and each prog_we writes one pattern
// and its port word; MODE_REFRESH accepts searches like normal mode and
// also asks the refresh controllers for a refresh every cycle.
//
// Strobes of one search, in the zero-delay model of the datapath: the
// clock edge with sar_load latches the address; during the next cycle the
// search argument register holds it, `evaluate` lets the DCAM discharge
// mismatching match lines, `pass` hands the settled match lines to the
// selection function (both high for the whole cycle, since the lines
// settle within it), and par_load makes the next edge latch the DRAM
// word into the port assignment register. A search that is already held
// completes even if the mode changes.
//
// mode_o reports what the cycle does: PROGRAM for a programming write or
// program mode, REFRESH when a refresh takes place, NORMAL otherwise.
// store_busy tells the refresh controllers that programming owns the
// store lines. All outputs are combinational.
module bpar_control
  import bpar_pkg::*;
(
  input  bpar_mode_t mode_i,
  input  logic       search_valid,
  input  logic       sar_valid,
  input  logic       prog_we,
  input  logic       refresh,
  output logic       search_ready,
  output logic       sar_load,
  output logic       evaluate,
  output logic       pass,
  output logic       par_load,
  output logic       prog_write,
  output logic       store_busy,
  output logic       force_refresh,
  output bpar_mode_t mode_o
);

  logic prog_mode;

  always_comb begin
    prog_mode     = (mode_i == MODE_PROGRAM);
    search_ready  = !prog_mode;
    sar_load      = search_valid && search_ready;
    evaluate      = sar_valid;
    pass          = evaluate;
    par_load      = pass;
    prog_write    = prog_mode && prog_we;
    store_busy    = prog_write;
    force_refresh = (mode_i == MODE_REFRESH);
    if (prog_mode)    mode_o = MODE_PROGRAM;
    else if (refresh) mode_o = MODE_REFRESH;
    else              mode_o = MODE_NORMAL;
  end

endmodule
