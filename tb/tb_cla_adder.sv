// tb_cla_adder: checks the carry-lookahead final adder.
//
// Drives the default 32-bit adder with random operands and carry-in and with
// carry-propagation corner cases (all ones plus one, alternating patterns)
// and compares {cout, s} with a behavioural 33-bit addition.
module tb_cla_adder;

  localparam int W = 32;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    logic [W:0] expected;
    a = ta;
    b = tb_;
    cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, s} != expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h expected=%h", ta, tb_, tc,
               {cout, s}, expected);
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
    apply('1, '0, 1'b1);
    apply('1, 32'h1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    apply('0, '0, 1'b0);
    for (int sh = 0; sh < W; sh++) apply(~(W'(1) << sh), W'(1), 1'b0);
    for (int n = 0; n < 50000; n++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
