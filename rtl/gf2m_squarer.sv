// gf2m_squarer: single-cycle squaring in GF(2^N), purely combinational.
//
//   y = a^2 mod f(x)
//
// Squaring a binary polynomial only spreads its coefficients apart
// (coefficient i moves to position 2i), giving 2N-1 bits. The bits from
// x^(2N-2) down to x^N are then folded back one by one with the low
// terms of the field polynomial, the highest first, so that a fold can
// set a lower bit that is still handled later. The result is available
// in the same cycle; the accelerator uses it as its optional dedicated
// squaring unit. The fold loop is this design's way of writing the
// reduction; with the sparse NIST polynomials it collapses into a small
// XOR network.
//
// Parameters: N field degree, POLY = f(x) - x^N (bit i is the
// coefficient of x^i).
module gf2m_squarer #(
  parameter int unsigned  N    = 163,
  parameter logic [N-1:0] POLY = N'(8'hC9)
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] y
);

  logic [2*N-2:0] s;

  always_comb begin
    s = '0;
    for (int i = 0; i < int'(N); i++) s[2*i] = a[i];
    for (int i = 2 * int'(N) - 2; i >= int'(N); i--) begin
      if (s[i]) begin
        s[i] = 1'b0;
        s ^= (2*N-1)'(POLY) << (i - int'(N));
      end
    end
    y = s[N-1:0];
  end

endmodule
