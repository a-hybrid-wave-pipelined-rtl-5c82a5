// tb_row_select -- exhaustive test of the row decoder: every address with
// enable high gives exactly its one-hot line; enable low gives none.
module tb_row_select;
  localparam int unsigned ROWS = 16;
  logic en;
  logic [3:0] addr;
  logic [ROWS-1:0] row;
  int checks = 0, failures = 0;

  row_select #(.ROWS(ROWS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < ROWS; a++) begin
        en = e[0];
        addr = 4'(a);
        #1;
        checks++;
        if (row !== (e ? (16'h1 << a) : 16'h0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d row=%h", e, a, row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
