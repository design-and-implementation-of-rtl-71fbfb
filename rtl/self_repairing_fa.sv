// self_repairing_fa: self-checking full adder whose outputs are corrected
// by two 2:1 multiplexers.
//
// Each output of the self-checking adder feeds a multiplexer both directly
// and through an inverter. The check flag of that output selects: the sum
// passes straight while fs = 1 (fault-free) and inverted while fs = 0; the
// carry passes straight while fc = 0 and inverted while fc = 1. A wrong
// single-bit output is thereby always turned back into the right value,
// and because the two checks are independent, a fault on the sum and one on
// the carry at the same time (a double fault) are both repaired. The flags
// come out as well so a fault can be logged. The multiplexer-and-inverter
// repair follows the published design; reading the flags this way follows
// from their fault-free values.
//
// Interface: a, b, cin in; flt_sum / flt_cout fault injection (tie to
// FLT_NONE in use); sum, cout repaired outputs; fs, fc check flags.
// Purely combinational.
module self_repairing_fa
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

  logic raw_sum, raw_cout;

  self_checking_fa u_scfa (
    .a       (a),
    .b       (b),
    .cin     (cin),
    .flt_sum (flt_sum),
    .flt_cout(flt_cout),
    .sum     (raw_sum),
    .cout    (raw_cout),
    .fs      (fs),
    .fc      (fc)
  );

  always_comb begin
    sum  = fs ? raw_sum  : ~raw_sum;
    cout = fc ? ~raw_cout : raw_cout;
  end

endmodule
