// tb_booth_encoder: exhaustive check of the exact and the decoder-reduction
// Booth decoders.
//
// Both variants are instantiated side by side and driven with all eight
// 3-bit groups. The expected digit of each group comes from the radix-4
// Booth table (exact) and the reduced table that maps +-2 to +-1 (approx),
// written here as literal arrays. The decoded controls are turned back into
// a digit and compared; the testbench also checks that `one` and `two` are
// never both set and that a zero digit never carries `neg`.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]  grp;
  booth_ctrl_t ctrl_exact, ctrl_approx;
  int checks = 0;
  int failures = 0;

  // Digit of group value 0..7 (index = {x[i+1], x[i], x[i-1]}).
  localparam int EXACT_DIGIT  [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
  localparam int APPROX_DIGIT [8] = '{0, 1, 1, 1, -1, -1, -1, 0};

  booth_encoder #(.APPROX(1'b0)) u_exact  (.grp(grp), .ctrl(ctrl_exact));
  booth_encoder #(.APPROX(1'b1)) u_approx (.grp(grp), .ctrl(ctrl_approx));

  function automatic int to_digit(booth_ctrl_t c);
    int m;
    m = c.two ? 2 : (c.one ? 1 : 0);
    return c.neg ? -m : m;
  endfunction

  task automatic check(string what, booth_ctrl_t c, int expected);
    checks++;
    if (to_digit(c) != expected || (c.one && c.two) ||
        (c.neg && !c.one && !c.two)) begin
      failures++;
      $display("FAIL %s grp=%03b ctrl=%03b digit=%0d expected=%0d",
               what, grp, c, to_digit(c), expected);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      grp = 3'(v);
      #1;
      check("exact", ctrl_exact, EXACT_DIGIT[v]);
      check("approx", ctrl_approx, APPROX_DIGIT[v]);
      // The approximate decoder never asks for 2X.
      checks++;
      if (ctrl_approx.two) begin
        failures++;
        $display("FAIL approx decoder selected 2X for grp=%03b", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
