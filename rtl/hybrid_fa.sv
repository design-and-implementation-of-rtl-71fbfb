// hybrid_fa: 1-bit hybrid full adder (XNOR-XNOR sum, multiplexer carry).
//
// The sum comes from two cascaded XNOR gates: x = XNOR(a, b), then
// sum = XNOR(x, cin), which equals a ^ b ^ cin. The carry comes from a
// 2:1 multiplexer selected by x: when a and b agree (x = 1) the carry is a,
// and when they differ (x = 0) the carry is cin. This structure, with the
// multiplexer's 0 input on cin and its 1 input on a, follows the published
// 20-transistor circuit. In silicon the multiplexer is a transmission gate
// followed by a buffer that restores full swing; the buffer has no logic
// function and does not appear here.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module hybrid_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic x;  // XNOR(a, b): 1 when a == b

  always_comb begin
    x    = ~(a ^ b);
    sum  = ~(x ^ cin);
    cout = x ? a : cin;
  end

endmodule
