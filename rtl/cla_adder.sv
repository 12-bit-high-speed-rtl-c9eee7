// cla_adder: W-bit carry-lookahead adder (W = 4 in the accumulator).
// Each bit forms a generate g = a & b and a propagate p = a ^ b (the
// half-adder at the top of each bit). Every carry is then built directly
// from g, p and c_in as one sum of products,
//   c[k] = g[k-1] | p[k-1]g[k-2] | ... | p[k-1]...p[0]c_in,
// so no carry waits on the carry below it: the path is one gate for p/g
// plus an AND-OR pair whatever the width. The sum bit is p ^ c.
// Interface: a, b, c_in in; sum, c_out out; purely combinational.
// The equations are the published ones; the loop that writes out the
// product terms is this design's way of expressing them for any W.
module cla_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c_in,
  output logic [W-1:0] sum,
  output logic         c_out
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // c[k] as an OR of product terms; term j is g[j] ANDed with every p above
  // it, and the last term is c_in ANDed with all of p[k-1:0].
  always_comb begin
    for (int k = 0; k <= W; k++) begin
      logic carry, chain;
      carry = 1'b0;
      for (int j = 0; j < k; j++) begin
        chain = g[j];
        for (int m = j + 1; m < k; m++) chain = chain & p[m];
        carry = carry | chain;
      end
      chain = c_in;
      for (int m = 0; m < k; m++) chain = chain & p[m];
      c[k] = carry | chain;
    end
  end

  assign sum   = p ^ c[W-1:0];
  assign c_out = c[W];
endmodule
