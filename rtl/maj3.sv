// maj3 - three-input majority voter.
//
// The majority gate is the basic cell of majority logic: its output is 1
// when at least two of its three inputs are 1, F = AB + BC + CA. Every other
// cell of this design (the approximate full adder, the exact majority-logic
// full adder and through them the adder/subtractors of the DCT) is built
// from instances of this gate plus inverters, so gate counts in the RTL match
// the majority-gate counts used to compare adder cells.
//
// Interface: three 1-bit inputs, one 1-bit output. Purely combinational.
module maj3 (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic f_o
);

  assign f_o = (a_i & b_i) | (b_i & c_i) | (a_i & c_i);

endmodule
