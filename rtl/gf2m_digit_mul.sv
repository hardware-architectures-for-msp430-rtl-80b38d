// gf2m_digit_mul: one step of an MSB-first digit-serial multiplier in
// GF(2^N), purely combinational.
//
//   work_next = ( work * x^D  +  opa * digit )  mod f(x)
//
// The N-bit Work value is shifted up by D bit positions (N+D bits), the
// N-bit operand OpA is multiplied carry-less by a D-bit digit of OpB
// (N+D-1 bits), the two are added (XOR) and the D overflowing bits are
// folded back with the low terms of the field polynomial. Repeating this
// for the digits of OpB, most significant first, starting from Work = 0,
// leaves OpA*OpB mod f in Work. This is the multiplier structure of the
// accelerator's datapath; the fold-back loop (one pass per overflow bit,
// highest first) is this design's way of writing the reduction box.
//
// Parameters: N field degree, D digit size, POLY = f(x) - x^N (bit i is
// the coefficient of x^i). The reduction is exact for any POLY; with the
// sparse NIST polynomials it is a few XORs per overflow bit.
// Interface: digit[D-1] is the coefficient of the highest power.
module gf2m_digit_mul #(
  parameter int unsigned   N    = 163,
  parameter int unsigned   D    = 2,
  parameter logic [N-1:0]  POLY = N'(8'hC9)
) (
  input  logic [N-1:0] work,
  input  logic [N-1:0] opa,
  input  logic [D-1:0] digit,
  output logic [N-1:0] work_next
);

  logic [N+D-1:0] sum;

  always_comb begin
    sum = {work, {D{1'b0}}};
    for (int j = 0; j < int'(D); j++) begin
      if (digit[j]) sum ^= {{D{1'b0}}, opa} << j;
    end
    // Fold the D overflow bits back, the highest first.
    for (int j = int'(D) - 1; j >= 0; j--) begin
      if (sum[N+j]) begin
        sum[N+j] = 1'b0;
        sum ^= {{D{1'b0}}, POLY} << j;
      end
    end
    work_next = sum[N-1:0];
  end

endmodule
