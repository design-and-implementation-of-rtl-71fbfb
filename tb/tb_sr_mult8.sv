// tb_sr_mult8: end-to-end test of the fault-tolerant multiplier at its
// default 8-bit width.
//
// Every one of the 65,536 operand pairs is applied once, one pair per
// 10 ns clock period. Each pair gets a fresh random fault pattern: one pair
// in four is fault-free, the rest inject random faults (stuck-at-0,
// stuck-at-1 or flip) on the sum and carry of about a quarter of the cells,
// so many cells carry single and double faults at once. Checks per pair:
//   - the product equals a*b computed by the testbench;
//   - no cell raises a detect flag on an output that has no injected fault;
//   - every flipped output is flagged (a flip always changes the value);
//   - fault_seen is the OR of the flags.
// The testbench counts how often each mechanism happened (stuck-at-0,
// stuck-at-1 and flip repairs, double repairs within one cell, repairs on
// sum and on carry, fault-free pairs) and counts a failure for any that
// never did. A watchdog ends the run with a failure if it does not finish.
module tb_sr_mult8;
  import ft_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned N = (W - 1) * W;

  logic [W-1:0]   a, b;
  fault_e [N-1:0] flt_sum, flt_cout;
  logic [2*W-1:0] p;
  logic [N-1:0]   det_sum, det_cout;
  logic           fault_seen;
  logic clk;
  int checks = 0, failures = 0;
  int n_clean = 0, n_stuck0 = 0, n_stuck1 = 0, n_flip = 0;
  int n_double = 0, n_sum_rep = 0, n_cout_rep = 0, n_faulted_pairs = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  sr_mult8 dut (
    .a(a), .b(b), .flt_sum(flt_sum), .flt_cout(flt_cout),
    .p(p), .det_sum(det_sum), .det_cout(det_cout), .fault_seen(fault_seen)
  );

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fault_e rand_fault();
    if ($urandom_range(3) != 0) return FLT_NONE;
    return fault_e'($urandom_range(3, 1));
  endfunction

  task automatic check_flags(input fault_e f, input logic det, input int k,
                             input string what);
    checks++;
    if (det && f == FLT_NONE) begin
      failures++;
      $display("FAIL cell %0d %s flagged without a fault (a=%0d b=%0d)", k, what, a, b);
    end
    checks++;
    if (f == FLT_FLIP && !det) begin
      failures++;
      $display("FAIL cell %0d %s flip not flagged (a=%0d b=%0d)", k, what, a, b);
    end
    if (det) begin
      case (f)
        FLT_STUCK0: n_stuck0++;
        FLT_STUCK1: n_stuck1++;
        FLT_FLIP:   n_flip++;
        default: ;
      endcase
    end
  endtask

  initial begin
    bit inject;
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      a = W'(v);
      b = W'(v >> W);
      inject = ($urandom_range(3) != 0);
      for (int k = 0; k < N; k++) begin
        flt_sum[k]  = inject ? rand_fault() : FLT_NONE;
        flt_cout[k] = inject ? rand_fault() : FLT_NONE;
      end
      @(posedge clk);
      checks++;
      if (p !== (2*W)'(a) * (2*W)'(b)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, got %0d", a, b, (2*W)'(a) * (2*W)'(b), p);
      end
      for (int k = 0; k < N; k++) begin
        check_flags(flt_sum[k],  det_sum[k],  k, "sum");
        check_flags(flt_cout[k], det_cout[k], k, "cout");
        if (det_sum[k] && det_cout[k]) n_double++;
      end
      n_sum_rep  += $countones(det_sum);
      n_cout_rep += $countones(det_cout);
      checks++;
      if (fault_seen !== |{det_sum, det_cout}) begin
        failures++;
        $display("FAIL fault_seen=%b", fault_seen);
      end
      if (!inject) begin
        n_clean++;
        checks++;
        if (fault_seen) begin
          failures++;
          $display("FAIL fault flagged on a fault-free pair a=%0d b=%0d", a, b);
        end
      end else if (fault_seen) n_faulted_pairs++;
    end
    $display("pairs: fault-free %0d, with repaired faults %0d", n_clean, n_faulted_pairs);
    $display("repairs: stuck-at-0 %0d, stuck-at-1 %0d, flip %0d, double-in-cell %0d, sum %0d, cout %0d",
             n_stuck0, n_stuck1, n_flip, n_double, n_sum_rep, n_cout_rep);
    checks += 7;
    if (n_clean == 0)         begin failures++; $display("FAIL no fault-free pair"); end
    if (n_faulted_pairs == 0) begin failures++; $display("FAIL no pair with a repaired fault"); end
    if (n_stuck0 == 0)        begin failures++; $display("FAIL no stuck-at-0 repair"); end
    if (n_stuck1 == 0)        begin failures++; $display("FAIL no stuck-at-1 repair"); end
    if (n_flip == 0)          begin failures++; $display("FAIL no flip repair"); end
    if (n_double == 0)        begin failures++; $display("FAIL no double repair in a cell"); end
    if (n_sum_rep == 0 || n_cout_rep == 0) begin failures++; $display("FAIL sum or cout repair never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
