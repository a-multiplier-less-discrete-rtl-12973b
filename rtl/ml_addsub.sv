// ml_addsub - fixed-function approximate ripple adder or subtractor.
//
// One of the 24 adder/subtractors of the DCT. SUB selects at elaboration
// time whether the unit computes a + b or a - b (two's complement, result
// modulo 2^W). The word is a ripple chain of one-bit cells:
//   bit 0                 half adder (a^b, carry a&b) or half subtractor
//                         (a^b, borrow ~a&b; the chain carries ~borrow)
//   bits 1..APPROX_BITS   the majority-logic approximate full adder
//                         (sum = a, carry = M(a, b', c))
//   bits above            the exact majority-logic full adder
// where b' is b for addition and ~b for subtraction, so subtraction is
// a + ~b + 1 with the +1 folded into the half subtractor.
//
// Since every cell's carry is the exact majority of its inputs, the carries
// are exact throughout: the result equals the exact sum or difference with
// bits 1..APPROX_BITS replaced by the same bits of a (those output bits
// are wires from a_i, by design). The error is therefore
// below 2^(APPROX_BITS+1) in magnitude and the result never wraps where the
// exact one does not.
//
// Using the approximate cell only in the low bits, the half adder and half
// subtractor in bit 0, and the exact cell above are this design's choices;
// the number of approximate bits is a parameter (0 gives an exact unit).
//
// Interface: a_i, b_i (W bits) in, s_o (W bits) out. Combinational.
module ml_addsub #(
  parameter int unsigned W           = 9,
  parameter int unsigned APPROX_BITS = 3,
  parameter bit          SUB         = 1'b0
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] s_o
);

  // carry[i] is the carry out of bit i
  logic [W-1:0] carry;
  logic [W-1:1] b_eff;                    // b as seen by the full adders

  assign b_eff = SUB ? ~b_i[W-1:1] : b_i[W-1:1];

  // bit 0: half adder or half subtractor
  assign s_o[0] = a_i[0] ^ b_i[0];
  if (SUB) begin : g_hs
    assign carry[0] = ~(~a_i[0] & b_i[0]);  // no borrow out of bit 0
  end else begin : g_ha
    assign carry[0] = a_i[0] & b_i[0];
  end

  for (genvar i = 1; i < W; i++) begin : g_bit
    if (i <= APPROX_BITS) begin : g_approx
      ml_afa u_fa (
        .a_i(a_i[i]), .b_i(b_eff[i]), .c_i(carry[i-1]),
        .s_o(s_o[i]), .c_o(carry[i])
      );
    end else begin : g_exact
      ml_exact_fa u_fa (
        .a_i(a_i[i]), .b_i(b_eff[i]), .c_i(carry[i-1]),
        .s_o(s_o[i]), .c_o(carry[i])
      );
    end
  end

  // the carry out of the top bit is not part of a modulo-2^W result
  logic unused_carry;
  assign unused_carry = carry[W-1];

endmodule
