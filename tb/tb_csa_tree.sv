// tb_csa_tree: checks the carry-save reduction tree.
//
// Random rows are applied to the default tree (nine 32-bit rows, as used by
// the 16-bit multiplier) and to a four-row tree, and the invariant
//   sum + carry == sum of all rows (mod 2**WIDTH)
// is checked with a plain behavioural addition. All-ones rows exercise the
// longest carry-save chains.
module tb_csa_tree;

  localparam int W = 32;

  logic [W-1:0] rows9 [9];
  logic [W-1:0] rows4 [4];
  logic [W-1:0] s9, c9, s4, c4;
  int checks = 0;
  int failures = 0;

  csa_tree dut9 (.rows(rows9), .sum(s9), .carry(c9));
  csa_tree #(.WIDTH(W), .ROWS(4)) dut4 (.rows(rows4), .sum(s4), .carry(c4));

  task automatic check_all();
    logic [W-1:0] ref9, ref4;
    #1;
    ref9 = '0;
    ref4 = '0;
    foreach (rows9[i]) ref9 += rows9[i];
    foreach (rows4[i]) ref4 += rows4[i];
    checks += 2;
    if (W'(s9 + c9) != ref9) begin
      failures++;
      $display("FAIL 9-row tree: sum=%h carry=%h expected total %h", s9, c9, ref9);
    end
    if (W'(s4 + c4) != ref4) begin
      failures++;
      $display("FAIL 4-row tree: sum=%h carry=%h expected total %h", s4, c4, ref4);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rows9[i]) rows9[i] = '1;
    foreach (rows4[i]) rows4[i] = '1;
    check_all();
    for (int n = 0; n < 20000; n++) begin
      foreach (rows9[i]) rows9[i] = $urandom;
      foreach (rows4[i]) rows4[i] = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
