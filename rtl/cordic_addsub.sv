// cordic_addsub -- adder/subtractor of a CORDIC path.
//
// Computes a + b when sub = 0 and a - b when sub = 1, in WIDTH-bit two's
// complement with wrap-around. It is built bit by bit as the full
// adder / full subtractor cells of the design's add/sub table:
//   adder:      S = A ^ B ^ Cin,   Cout = (A ^ B) & Cin | A & B
//   subtractor: D = A ^ B ^ Bin,   Bout = ~(A ^ B) & Bin | ~A & B
// chained as a ripple. The direction bit d_i of the CORDIC drives sub.
// Combinational.
module cordic_addsub #(
  parameter int unsigned WIDTH = 9
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,   // 0: a + b, 1: a - b
  output logic [WIDTH-1:0] s
);

  logic c;   // running carry (add) or borrow (sub) of the ripple

  always_comb begin
    c = 1'b0;
    s = '0;
    for (int k = 0; k < WIDTH; k++) begin
      s[k] = a[k] ^ b[k] ^ c;
      if (sub) c = (~(a[k] ^ b[k]) & c) | (~a[k] & b[k]);
      else     c = ((a[k] ^ b[k]) & c) | (a[k] & b[k]);
    end
  end

endmodule
