// uffm: universal finite-field Montgomery multiplier.
//
// Computes S = A * B * x^-m mod p(x) in GF(2^m) for any degree m <= D and any
// p(x) of that degree, given at run time. It is the bit-parallel array of the
// design's Fig. 2 style: D rows, each row adding a_i * B to the running sum, then
// c * p(x) where c is the sum's lowest bit (so the sum becomes divisible by x),
// then shifting right by one. Each row has one "Z" cell at bit 0, which forms
// c = s0 ^ a_i b0, and D "Y" cells, s_out = s_in ^ a_i b_j ^ c m_j, whose result
// moves one position down (the divide by x).
//
// With D rows a plain array would divide by x^D. To make the factor x^-m for a
// smaller field, A is fed to the last m rows: the first D-m rows see a = 0 and a
// zero sum, so they do nothing. This keeps the correction factor k(x) = x^m.
//
// Purely combinational. Inputs a and b must be reduced (bits m and above zero);
// p holds p(x) with its x^m bit set and p(0) = 1.
module uffm #(
  parameter int D = 8
) (
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  input  logic [D:0]   p,
  input  logic [3:0]   m,
  output logic [D-1:0] s
);

  logic [D-1:0] a_al;            // A aligned to the last m rows
  logic [D:0]   sum [0:D];       // partial sum entering each row
  logic [D:0]   bx;              // B with a zero top bit (t_D = 0)
  logic [D-1:0] c;               // Z-cell carry of each row

  assign a_al = a << (D - int'(m));
  assign bx   = {1'b0, b};

  always_comb begin
    sum[0] = '0;
    for (int r = 0; r < D; r++) begin
      // Z cell
      c[r] = sum[r][0] ^ (a_al[r] & bx[0]);
      // Y cells: bit j of (sum + a b + c p) lands at j-1
      for (int j = 1; j <= D; j++)
        sum[r+1][j-1] = sum[r][j] ^ (a_al[r] & bx[j]) ^ (c[r] & p[j]);
      sum[r+1][D] = 1'b0;
    end
  end

  assign s = sum[D][D-1:0];

endmodule
