// tb_pp_gen: checks the Booth partial-product generator.
//
// For random and corner multiplicands and every digit -2..+2 the controls
// are driven directly, and the generator's output is checked through the
// identity  signed(pp) + neg == digit * x , i.e. the inverted partial
// product plus its separate +1 must equal the exact signed multiple.
module tb_pp_gen;
  import booth_pkg::*;

  localparam int W = 16;

  logic [W-1:0] x;
  booth_ctrl_t  ctrl;
  logic [W:0]   pp;
  logic         neg;
  int checks = 0;
  int failures = 0;

  pp_gen #(.WIDTH(W)) dut (.x(x), .ctrl(ctrl), .pp(pp), .neg(neg));

  task automatic try_digit(int d);
    int expected, got;
    ctrl.neg = (d < 0);
    ctrl.one = (d == 1 || d == -1);
    ctrl.two = (d == 2 || d == -2);
    #1;
    expected = d * int'($signed(x));
    got      = int'($signed(pp)) + int'(neg);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL x=%0d digit=%0d pp=%h neg=%b got=%0d expected=%0d",
               $signed(x), d, pp, neg, got, expected);
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
    automatic logic [W-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                  16'h8000, 16'h5555};
    foreach (corners[i]) begin
      x = corners[i];
      for (int d = -2; d <= 2; d++) try_digit(d);
    end
    for (int n = 0; n < 2000; n++) begin
      x = W'($urandom);
      for (int d = -2; d <= 2; d++) try_digit(d);
    end
    // A zero digit with the sign control set must still give zero.
    x = 16'h1234;
    ctrl = '{neg: 1'b1, one: 1'b0, two: 1'b0};
    #1;
    checks++;
    if (pp != '0 || neg) begin
      failures++;
      $display("FAIL negated zero gave pp=%h neg=%b", pp, neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
