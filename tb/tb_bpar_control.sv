// tb_bpar_control -- exhaustive test of the mode and strobe controller:
// every requested mode with every combination of search_valid, sar_valid,
// prog_we and refresh, against the mode rules written out independently.
module tb_bpar_control;
  import bpar_pkg::*;
  bpar_mode_t mode_i, mode_o;
  logic search_valid, sar_valid, prog_we, refresh;
  logic search_ready, sar_load, evaluate, pass, par_load, prog_write, store_busy, force_refresh;
  int checks = 0, failures = 0;

  bpar_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (mode %0d in %b)", what, got, exp, mode_i,
               {search_valid, sar_valid, prog_we, refresh});
    end
  endtask

  initial begin
    bpar_mode_t modes[3] = '{MODE_NORMAL, MODE_PROGRAM, MODE_REFRESH};
    foreach (modes[m]) begin
      for (int v = 0; v < 16; v++) begin
        logic prog;
        mode_i = modes[m];
        {search_valid, sar_valid, prog_we, refresh} = 4'(v);
        #1;
        prog = (modes[m] == MODE_PROGRAM);
        check(32'(search_ready), 32'(!prog), "search_ready");
        check(32'(sar_load), 32'(!prog && search_valid), "sar_load");
        check(32'(evaluate), 32'(sar_valid), "evaluate");
        check(32'(pass), 32'(sar_valid), "pass");
        check(32'(par_load), 32'(sar_valid), "par_load");
        check(32'(prog_write), 32'(prog && prog_we), "prog_write");
        check(32'(store_busy), 32'(prog && prog_we), "store_busy");
        check(32'(force_refresh), 32'(modes[m] == MODE_REFRESH), "force_refresh");
        check(32'(mode_o), prog ? 32'(MODE_PROGRAM) : (refresh ? 32'(MODE_REFRESH) : 32'(MODE_NORMAL)), "mode_o");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
