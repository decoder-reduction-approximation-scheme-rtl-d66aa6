// cla_adder: carry-lookahead adder used as the multiplier's final adder.
//
// The operands are split into 4-bit blocks. Inside a block every carry is
// computed directly from the block's generate (a&b) and propagate (a^b)
// bits and the block's carry-in, in two-level lookahead form
//   c[i+1] = g[i] | p[i]&g[i-1] | ... | p[i]&...&p[0]&cin.
// Each block also forms a group generate and group propagate, and a second
// lookahead level over the blocks gives every block's carry-in from the
// group signals, so the carry never ripples bit by bit.
//
// Interface: a, b (WIDTH bits), cin in; s (WIDTH bits) and cout out.
// Combinational. WIDTH must be a multiple of 4.
//
// The source asks for a carry-lookahead or other fast parallel adder for
// this stage; the 4-bit block size and the two-level arrangement are this
// design's choice.
module cla_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int NB = WIDTH / 4;  // number of 4-bit blocks

  logic [WIDTH-1:0] g, p;    // bit generate / propagate
  logic [WIDTH:0]   c;       // carry into each bit
  logic [NB-1:0]    bg, bp;  // block generate / propagate
  logic [NB:0]      bc;      // carry into each block

  initial begin
    assert (WIDTH % 4 == 0) else $error("cla_adder WIDTH must be a multiple of 4");
  end

  always_comb begin
    g = a & b;
    p = a ^ b;

    // Block generate and propagate.
    for (int k = 0; k < NB; k++) begin
      bp[k] = &p[4*k +: 4];
      bg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end

    // Second level: carry into every block straight from the group signals.
    for (int k = 0; k <= NB; k++) begin
      logic acc;
      logic run;
      acc = 1'b0;
      run = 1'b1;  // product of the block propagates above block j
      for (int j = k - 1; j >= 0; j--) begin
        acc = acc | (run & bg[j]);
        run = run & bp[j];
      end
      bc[k] = acc | (run & cin);
    end

    // First level: carries inside each block from the block's carry-in.
    for (int k = 0; k < NB; k++) begin
      c[4*k]   = bc[k];
      c[4*k+1] = g[4*k]   | (p[4*k] & bc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k])
               | (p[4*k+1] & p[4*k] & bc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1])
               | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & bc[k]);
    end
    c[WIDTH] = bc[NB];

    s    = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
