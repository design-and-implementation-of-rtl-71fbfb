// functional_unit: reference value for the carry check of the
// self-checking full adder.
//
// A correct full-adder carry equals cin whenever a != b, and equals a (= b)
// whenever a == b. So cout ^ cin of a correct adder is 1 exactly when
// a == b != cin, i.e. f1 = a&b&~cin | ~a&~b&cin. The carry checker compares
// this, computed from the primary inputs alone, against XNOR(cout, cin) of
// the adder under test. The published circuit realises this unit with 14
// transistors; its gate structure is not given, so the sum of products
// above is this design's own choice, picked so that the checker's flag is
// 0 on a fault-free adder as the design requires.
//
// Interface: a, b, cin in; f1 out. Purely combinational.
module functional_unit (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic f1
);

  always_comb f1 = (a & b & ~cin) | (~a & ~b & cin);

endmodule
