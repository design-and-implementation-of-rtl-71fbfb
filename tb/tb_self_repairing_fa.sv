// tb_self_repairing_fa: exhaustive test of the self-repairing full adder.
//
// Every input combination is applied with every pair of injected faults on
// the raw sum and carry (8 x 4 x 4 cases). The repaired sum and cout must
// always equal a + b + cin, whatever was injected, and the flags must
// report exactly the outputs the injected fault corrupted (fs = 0 for the
// sum, fc = 1 for the carry). Single and double repairs are counted and
// each must occur.
module tb_self_repairing_fa;
  import ft_pkg::*;
  logic a, b, cin, sum, cout, fs, fc;
  fault_e flt_sum, flt_cout;
  logic clk;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_clean = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  self_repairing_fa dut (
    .a(a), .b(b), .cin(cin), .flt_sum(flt_sum), .flt_cout(flt_cout),
    .sum(sum), .cout(cout), .fs(fs), .fc(fc)
  );

  function automatic logic faulted(logic v, int f);
    case (f)
      1: return 1'b0;
      2: return 1'b1;
      3: return ~v;
      default: return v;
    endcase
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] s;
    logic sum_bad, cout_bad;
    for (int fsel = 0; fsel < 4; fsel++)
      for (int fcsel = 0; fcsel < 4; fcsel++)
        for (int v = 0; v < 8; v++) begin
          {a, b, cin} = 3'(v);
          flt_sum  = fault_e'(fsel);
          flt_cout = fault_e'(fcsel);
          @(posedge clk);
          s = 2'(a) + 2'(b) + 2'(cin);
          sum_bad  = (faulted(s[0], fsel)  != s[0]);
          cout_bad = (faulted(s[1], fcsel) != s[1]);
          if (sum_bad && cout_bad) n_double++;
          else if (sum_bad || cout_bad) n_single++;
          else n_clean++;
          checks += 4;
          if (sum !== s[0])  begin failures++; $display("FAIL sum %b exp %b a=%b b=%b cin=%b flt=%0d/%0d", sum, s[0], a, b, cin, fsel, fcsel); end
          if (cout !== s[1]) begin failures++; $display("FAIL cout %b exp %b a=%b b=%b cin=%b flt=%0d/%0d", cout, s[1], a, b, cin, fsel, fcsel); end
          if (fs !== !sum_bad) begin failures++; $display("FAIL fs=%b", fs); end
          if (fc !== cout_bad) begin failures++; $display("FAIL fc=%b", fc); end
        end
    checks += 3;
    if (n_clean == 0)  begin failures++; $display("FAIL no fault-free case"); end
    if (n_single == 0) begin failures++; $display("FAIL no single repair"); end
    if (n_double == 0) begin failures++; $display("FAIL no double repair"); end
    $display("cases: fault-free %0d, single repair %0d, double repair %0d", n_clean, n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
