// tb_functional_unit: exhaustive test of the carry-check reference.
//
// For every input combination the expected f1 is worked out from the
// arithmetic carry: f1 must equal carry(a + b + cin) xor cin. A watchdog
// ends the run with a failure if it does not finish.
module tb_functional_unit;
  logic a, b, cin, f1;
  logic clk;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  functional_unit dut (.a(a), .b(b), .cin(cin), .f1(f1));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] s;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      @(posedge clk);
      s = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if (f1 !== (s[1] ^ cin) || s[0] !== (a ^ b ^ cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b f1=%b expected %b", a, b, cin, f1, s[1] ^ cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
