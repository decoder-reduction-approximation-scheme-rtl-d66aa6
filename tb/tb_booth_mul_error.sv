// tb_booth_mul_error: accuracy of the decoder-reduction approximation.
//
// Instantiates the multiplier once for every approximation level
// APPROX_GROUPS = 0..8 and applies the same random signed operand pairs to
// all of them. For each level it reports the error rate (share of products
// that differ from the exact product), the mean error distance and the mean
// relative error distance |approx - exact| / |exact| over non-zero exact
// products. Checks per product and level:
//   - level 0 gives exactly a*b;
//   - the error never exceeds the bound sum_{g < level} |a| * 4**g, since
//     replacing a +-2 digit by +-1 changes the product by |a| * 4**g;
//   - a product whose approximated groups hold no 011 / 100 is exact.
module tb_booth_mul_error;

  localparam int W  = 16;
  localparam int NG = W / 2;
  localparam int N_VECTORS = 200000;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] c [NG+1];
  int checks = 0;
  int failures = 0;

  for (genvar k = 0; k <= NG; k++) begin : g_level
    booth_mul_16x16 #(.WIDTH(W), .APPROX_GROUPS(k)) dut (.a(a), .b(b), .c(c[k]));
  end

  // Does any of the `level` lowest groups of m hold 011 or 100?
  function automatic bit has_two(logic [W-1:0] m, int level);
    logic [W:0] me;
    me = {m, 1'b0};
    for (int g = 0; g < level; g++)
      if (me[2*g +: 3] == 3'b011 || me[2*g +: 3] == 3'b100) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n_err [NG+1];
    real    sum_ed [NG+1];
    real    sum_red [NG+1];
    longint n_nonzero;
    n_nonzero = 0;
    for (int k = 0; k <= NG; k++) begin
      n_err[k] = 0;
      sum_ed[k] = 0.0;
      sum_red[k] = 0.0;
    end
    for (int n = 0; n < N_VECTORS; n++) begin
      longint exact, got, err, bound;
      a = W'($urandom);
      b = W'($urandom);
      #1;
      exact = longint'($signed(a)) * longint'($signed(b));
      if (exact != 0) n_nonzero++;
      bound = 0;
      for (int k = 0; k <= NG; k++) begin
        got = longint'($signed(c[k]));
        err = got - exact;
        if (err < 0) err = -err;
        checks++;
        if (err > bound || (!has_two(b, k) && err != 0)) begin
          failures++;
          if (failures < 20)
            $display("FAIL level=%0d a=%h b=%h got=%0d exact=%0d", k, a, b, got, exact);
        end
        if (err != 0) n_err[k]++;
        sum_ed[k] += real'(err);
        if (exact != 0) sum_red[k] += real'(err) / real'(exact < 0 ? -exact : exact);
        if (k < NG) begin
          longint mag;
          mag = longint'($signed(a));
          if (mag < 0) mag = -mag;
          bound += mag << (2 * k);
        end
      end
    end
    $display("level  error_rate  mean_error_distance  mean_relative_error");
    for (int k = 0; k <= NG; k++)
      $display("%5d  %10.4f  %19.1f  %19.6f", k, real'(n_err[k]) / N_VECTORS,
               sum_ed[k] / N_VECTORS, sum_red[k] / real'(n_nonzero));
    // The exact configuration must have no error at all.
    checks++;
    if (n_err[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
