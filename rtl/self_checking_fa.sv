// self_checking_fa: hybrid full adder with concurrent checks on both
// outputs.
//
// Two flags locate a fault on the adder's outputs:
//   sum check:   G2 = XNOR(a, b), G3 = XNOR(sum, cin), fs = XNOR(G2, G3).
//                A correct sum makes G2 == G3, so fs = 1 when fault-free.
//   carry check: G1 = XNOR(cout, cin), F1 from the functional unit,
//                fc = XNOR(G1, F1). F1 is the expected cout ^ cin, so a
//                correct carry makes G1 == ~F1 and fc = 0 when fault-free.
// A wrong sum drives fs to 0, a wrong carry drives fc to 1; both can be
// flagged at once. The five XNOR gates, the functional unit and their
// wiring follow the published block diagram; the exact function of the
// functional unit is derived from the fault-free flag values.
//
// flt_sum / flt_cout inject a fault (see ft_pkg) on the raw adder outputs
// ahead of the checkers; they are this design's own test hook and are tied
// to FLT_NONE in normal use. The sum and cout ports carry the (possibly
// faulty) raw adder outputs. Purely combinational.
module self_checking_fa
  import ft_pkg::*;
(
  input  logic   a,
  input  logic   b,
  input  logic   cin,
  input  fault_e flt_sum,
  input  fault_e flt_cout,
  output logic   sum,
  output logic   cout,
  output logic   fs,
  output logic   fc
);

  logic fa_sum, fa_cout;
  logic g1, g2, g3, f1;

  hybrid_fa u_fa (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (fa_sum),
    .cout(fa_cout)
  );

  functional_unit u_fu (
    .a  (a),
    .b  (b),
    .cin(cin),
    .f1 (f1)
  );

  always_comb begin
    sum  = apply_fault(fa_sum,  flt_sum);
    cout = apply_fault(fa_cout, flt_cout);
    g1   = ~(cout ^ cin);
    g2   = ~(a ^ b);
    g3   = ~(sum ^ cin);
    fs   = ~(g2 ^ g3);
    fc   = ~(g1 ^ f1);
  end

endmodule
