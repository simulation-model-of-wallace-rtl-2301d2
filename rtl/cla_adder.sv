// Carry look-ahead adder: adds two WIDTH-bit operands and a carry in.
//
// Each bit position forms a generate g = a & b and a propagate p = a ^ b.
// The carry into every position is computed directly from the g, p of the
// positions below it and from the carry in, as the expanded sum of products
//   c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[1]g[0] | p[i]..p[0]cin,
// so no carry waits for the one below it. The sum bit is p[i] ^ c[i].
//
// WIDTH defaults to 8, the width of the multiplier's result. The multiplier's
// design calls for a carry look-ahead adder on its two 8-bit intermediate
// operands; the single-level, fully expanded form is this design's choice.
// Purely combinational; cout is the carry out of the top bit.
module cla_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  always_comb begin
    logic term;
    g    = a & b;
    p    = a ^ b;
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) begin
      // Carry in, propagated through positions 0..i.
      term = cin;
      for (int j = 0; j <= i; j++) term = term & p[j];
      c[i+1] = term;
      // Carry generated at position k, propagated through k+1..i.
      for (int k = 0; k <= i; k++) begin
        term = g[k];
        for (int j = k + 1; j <= i; j++) term = term & p[j];
        c[i+1] = c[i+1] | term;
      end
    end
    sum  = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end

endmodule
