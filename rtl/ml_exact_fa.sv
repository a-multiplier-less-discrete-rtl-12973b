// ml_exact_fa - exact full adder in majority logic.
//
// The classic three-gate majority-logic full adder:
//   Cout = M(A, B, Cin)
//   Sum  = M(~Cout, Cin, M(A, B, ~Cin))
// It uses three majority gates and two inverters. The adder/subtractors of
// the DCT use it in the bit positions above their approximate low bits, so
// those positions are exact. Which cell fills the upper bits is a choice of
// this design.
//
// Interface: a_i, b_i, c_i in; s_o (sum), c_o (carry) out. Combinational.
module ml_exact_fa (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic s_o,
  output logic c_o
);

  logic m_inner;

  maj3 u_carry (
    .a_i(a_i),
    .b_i(b_i),
    .c_i(c_i),
    .f_o(c_o)
  );

  maj3 u_inner (
    .a_i(a_i),
    .b_i(b_i),
    .c_i(~c_i),
    .f_o(m_inner)
  );

  maj3 u_sum (
    .a_i(~c_o),
    .b_i(c_i),
    .c_i(m_inner),
    .f_o(s_o)
  );

endmodule
