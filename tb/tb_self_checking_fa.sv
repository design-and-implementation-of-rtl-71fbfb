// tb_self_checking_fa: exhaustive test of the self-checking full adder.
//
// Every input combination is applied with every pair of injected faults
// (none, stuck-at-0, stuck-at-1, flip on sum and on cout): 8 x 4 x 4 cases.
// For each, the testbench works out the correct sum and carry from
// a + b + cin, applies the injected fault itself to get the raw outputs it
// expects, and checks that fs = 1 exactly when the raw sum is correct and
// fc = 0 exactly when the raw carry is correct. It also counts how many
// cases had a fault that actually changed an output (an active fault) and
// requires each kind, single and double, to occur.
module tb_self_checking_fa;
  import ft_pkg::*;
  logic a, b, cin, sum, cout, fs, fc;
  fault_e flt_sum, flt_cout;
  logic clk;
  int checks = 0, failures = 0;
  int n_sum_only = 0, n_cout_only = 0, n_double = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  self_checking_fa dut (
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
    logic es, ec, sum_bad, cout_bad;
    for (int fsel = 0; fsel < 4; fsel++)
      for (int fcsel = 0; fcsel < 4; fcsel++)
        for (int v = 0; v < 8; v++) begin
          {a, b, cin} = 3'(v);
          flt_sum  = fault_e'(fsel);
          flt_cout = fault_e'(fcsel);
          @(posedge clk);
          s  = 2'(a) + 2'(b) + 2'(cin);
          es = faulted(s[0], fsel);
          ec = faulted(s[1], fcsel);
          sum_bad  = (es != s[0]);
          cout_bad = (ec != s[1]);
          if (sum_bad && cout_bad) n_double++;
          else if (sum_bad) n_sum_only++;
          else if (cout_bad) n_cout_only++;
          checks += 4;
          if (sum !== es) begin failures++; $display("FAIL raw sum %b exp %b (v=%0d fs=%0d fc=%0d)", sum, es, v, fsel, fcsel); end
          if (cout !== ec) begin failures++; $display("FAIL raw cout %b exp %b (v=%0d)", cout, ec, v); end
          if (fs !== !sum_bad) begin failures++; $display("FAIL fs=%b sum_bad=%b a=%b b=%b cin=%b", fs, sum_bad, a, b, cin); end
          if (fc !== cout_bad) begin failures++; $display("FAIL fc=%b cout_bad=%b a=%b b=%b cin=%b", fc, cout_bad, a, b, cin); end
        end
    checks += 3;
    if (n_sum_only == 0)  begin failures++; $display("FAIL no sum-only fault case"); end
    if (n_cout_only == 0) begin failures++; $display("FAIL no cout-only fault case"); end
    if (n_double == 0)    begin failures++; $display("FAIL no double fault case"); end
    $display("active faults: sum only %0d, cout only %0d, double %0d", n_sum_only, n_cout_only, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
