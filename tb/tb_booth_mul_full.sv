// tb_booth_mul_full: the multiplier at its default parameters (16 x 16 bit,
// exact decoding) against the plain signed product.
//
// Checks the operand pair whose product the source's simulation waveform
// prints bit by bit (a = 1111110010011101, b = 0000001101111001, product
// 0xFFF43D35), the other pair shown there, every product of a full row and
// column sweep (all 65536 values of one operand against a set of fixed
// values of the other) and one million random pairs.
module tb_booth_mul_full;

  logic [15:0] a, b;
  logic [31:0] c;
  int checks = 0;
  int failures = 0;

  booth_mul_16x16 dut (.a(a), .b(b), .c(c));

  task automatic apply(logic [15:0] ta, logic [15:0] tb_);
    logic [31:0] expected;
    a = ta;
    b = tb_;
    #1;
    expected = 32'(int'($signed(ta)) * int'($signed(tb_)));
    checks++;
    if (c !== expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h got=%h expected=%h", ta, tb_, c, expected);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] fixed [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                                        16'h8000, 16'h6B35};
    // Value printed in the source's waveform for this pair.
    a = 16'b1111110010011101;
    b = 16'b0000001101111001;
    #1;
    checks++;
    if (c !== 32'b11111111111101000011110100110101) begin
      failures++;
      $display("FAIL waveform vector: got %b", c);
    end
    apply(16'b1111110111001001, 16'b0000001100101001);
    foreach (fixed[k]) begin
      for (int v = 0; v < 65536; v++) begin
        apply(16'(v), fixed[k]);
        apply(fixed[k], 16'(v));
      end
    end
    for (int n = 0; n < 1000000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
