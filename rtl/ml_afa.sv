// ml_afa - majority-logic approximate full adder.
//
// The cell keeps the carry of a full adder exact and gives up the sum:
//   Cout = M(A, B, Cin)      one majority gate
//   Sum  = A                 a wire, no gate and no inverter
// Against an exact full adder it is wrong in 4 of the 8 input combinations
// (error rate 0.5), each time by one unit, so the mean error distance is 0.5
// and, normalised to the largest output value 3, NMED = 1/6. Because the
// carry is the exact majority, a chain of these cells propagates exact
// carries: an adder that uses the cell in its low bits is exact above them.
//
// The truth table is that of the proposed adder cell; the cell is written
// here from its logic function (one instance of maj3), not from its
// transistor-level circuit.
//
// Interface: a_i, b_i, c_i in; s_o (approximate sum), c_o (carry) out.
// Purely combinational.
module ml_afa (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic s_o,
  output logic c_o
);

  maj3 u_carry (
    .a_i(a_i),
    .b_i(b_i),
    .c_i(c_i),
    .f_o(c_o)
  );

  assign s_o = a_i;

endmodule
