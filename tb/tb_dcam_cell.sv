// tb_dcam_cell -- self-checking test of one ternary DCAM cell.
// Writes each legal code (don't care, one, zero), checks the stored nodes,
// and checks the mismatch output for every combination of compare lines
// against the ternary matching rule. Also checks that a cell whose write
// line is low keeps its value.
module tb_dcam_cell;
  import bpar_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic write = 1'b0, bit_store = 1'b0, nbit_store = 1'b0;
  logic bit_compare = 1'b0, nbit_compare = 1'b0;
  logic sb1, sb0, mismatch;
  int checks = 0, failures = 0;

  dcam_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // reference: a search bit b mismatches stored digit t
  function automatic logic ref_mismatch(ternary_t t, logic bc, logic nbc);
    // active search: compare lines complementary; idle: both low
    if (!bc && !nbc) return 1'b0;
    case (t)
      TERN_ONE:  return (bc == 1'b0);
      TERN_ZERO: return (bc == 1'b1);
      default:   return 1'b0;
    endcase
  endfunction

  ternary_t codes[3] = '{TERN_X, TERN_ONE, TERN_ZERO};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sb1 | sb0, 1'b0, "reset value is don't care");
    foreach (codes[i]) begin
      @(negedge clk);
      {bit_store, nbit_store} = codes[i];
      write = 1'b1;
      @(negedge clk);
      write = 1'b0;
      // change the store lines: cell must hold
      {bit_store, nbit_store} = ~codes[i];
      @(negedge clk);
      check(sb1, codes[i][1], $sformatf("Sb1 of code %0d", i));
      check(sb0, codes[i][0], $sformatf("Sb0 of code %0d", i));
      for (int c = 0; c < 3; c++) begin
        case (c)
          0: {bit_compare, nbit_compare} = 2'b10;  // search bit 1
          1: {bit_compare, nbit_compare} = 2'b01;  // search bit 0
          default: {bit_compare, nbit_compare} = 2'b00;  // idle
        endcase
        #1;
        check(mismatch, ref_mismatch(codes[i], bit_compare, nbit_compare),
              $sformatf("mismatch code %0d compare %0d", i, c));
      end
      {bit_compare, nbit_compare} = 2'b00;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
