// tb_hybrid_fa: exhaustive self-checking test of the hybrid full adder.
//
// Applies all eight input combinations, one per 10 ns clock period (the
// 100 MHz input rate used to characterise the cell), and compares sum and
// cout against the arithmetic sum a + b + cin. A watchdog ends the run with
// a failure if it does not finish.
module tb_hybrid_fa;
  logic a, b, cin, sum, cout;
  logic clk;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  hybrid_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expect_v;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      @(posedge clk);
      expect_v = 2'(a) + 2'(b) + 2'(cin);
      checks += 2;
      if (sum !== expect_v[0]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b sum=%b expected %b", a, b, cin, sum, expect_v[0]);
      end
      if (cout !== expect_v[1]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout=%b expected %b", a, b, cin, cout, expect_v[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
