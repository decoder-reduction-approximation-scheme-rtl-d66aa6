// tb_booth_mul_16x16: end-to-end test of the Booth multiplier in its exact
// and its decoder-reduction (approximate) configurations.
//
// Three multipliers see the same operands: the default, exact one
// (APPROX_GROUPS = 0), one whose two lowest groups use the approximate
// decoder, and one in which all eight groups do. The exact product is the
// plain signed product a*b. The approximate references are computed here
// digit by digit: the multiplier is recoded with the radix-4 table, and in
// the approximated groups every +-2 digit is replaced by +-1, so
//   ref = sum_g digit_g * a * 4**g .
// Operands are corner values, the two operand pairs shown in the source's
// simulation waveform, and random pairs, half of them with a multiplier
// rich in 011/100 groups. The testbench counts how often each mechanism
// occurred (+2 and -2 digits, negative digits, zero digits, an approximation
// that changed the product, an approximation that left it exact) and counts
// a failure for any mechanism that never happened.
module tb_booth_mul_16x16;

  localparam int W  = 16;
  localparam int NG = W / 2;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] c_exact, c_low2, c_all;
  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_plus2 = 0, n_minus2 = 0, n_neg = 0, n_zero = 0;
  int n_approx_err = 0, n_approx_exact = 0;

  booth_mul_16x16 dut_exact (.a(a), .b(b), .c(c_exact));
  booth_mul_16x16 #(.WIDTH(W), .APPROX_GROUPS(2))  dut_low2 (.a(a), .b(b), .c(c_low2));
  booth_mul_16x16 #(.WIDTH(W), .APPROX_GROUPS(NG)) dut_all  (.a(a), .b(b), .c(c_all));

  // Radix-4 digit of group g of multiplier m; approximated when approx set.
  function automatic longint digit(logic [W-1:0] m, int g, bit approx);
    logic [W:0] me;
    logic [2:0] t;
    me = {m, 1'b0};
    t  = me[2*g +: 3];
    case (t)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b101, 3'b110: return -1;
      3'b011:         return approx ? 1 : 2;
      default:        return approx ? -1 : -2;  // 3'b100
    endcase
  endfunction

  function automatic logic [2*W-1:0] ref_product(logic [W-1:0] x, logic [W-1:0] m,
                                                 int approx_groups);
    longint acc;
    acc = 0;
    for (int g = 0; g < NG; g++)
      acc += digit(m, g, g < approx_groups) * longint'($signed(x)) * (longint'(1) << (2 * g));
    return (2*W)'(acc);
  endfunction

  task automatic compare(string what, logic [2*W-1:0] got, logic [2*W-1:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h got=%h expected=%h", what, a, b, got, expected);
    end
  endtask

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb_);
    logic [2*W-1:0] exact;
    a = ta;
    b = tb_;
    #1;
    exact = (2*W)'(longint'($signed(ta)) * longint'($signed(tb_)));
    compare("exact", c_exact, exact);
    // The digit-sum model with no approximation must agree with a*b.
    compare("model", ref_product(ta, tb_, 0), exact);
    compare("approx2", c_low2, ref_product(ta, tb_, 2));
    compare("approx8", c_all, ref_product(ta, tb_, NG));
    for (int g = 0; g < NG; g++) begin
      case (digit(tb_, g, 1'b0))
        2:  n_plus2++;
        -2: n_minus2++;
        0:  n_zero++;
        default: ;
      endcase
      if (digit(tb_, g, 1'b0) < 0) n_neg++;
    end
    if (c_low2 != exact) n_approx_err++;
    else if (digit(tb_, 0, 1'b0) != 0 || digit(tb_, 1, 1'b0) != 0) n_approx_exact++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %-28s %0d", what, count);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [W-1:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                           16'h8000, 16'h8001, 16'h5555, 16'hAAAA};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    // Operand pairs of the source's simulation waveform.
    apply(16'b1111110111001001, 16'b0000001100101001);
    apply(16'b1111110010011101, 16'b0000001101111001);
    for (int n = 0; n < 100000; n++) begin
      logic [W-1:0] m;
      m = W'($urandom);
      // Every other vector: multiplier built from 011 / 100 patterns.
      if (n % 2 == 1) m = m ^ 16'h3333;
      apply(W'($urandom), m);
    end
    require("+2 digit", n_plus2);
    require("-2 digit", n_minus2);
    require("negative partial product", n_neg);
    require("zero digit", n_zero);
    require("approximation changed product", n_approx_err);
    require("approximation stayed exact", n_approx_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
