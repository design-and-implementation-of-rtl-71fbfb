// ft_pkg: types and helpers shared by the fault-tolerant adder cells.
//
// fault_e names the fault that can be injected on one raw adder output:
// none, stuck-at-0, stuck-at-1, or a bit flip (a transient upset). The
// adder cells themselves are purely combinational; injection exists so the
// self-checking and self-repairing logic can be exercised in simulation.
// In normal use every injection input is tied to FLT_NONE. The fault model
// and its encoding are this design's own choice.
package ft_pkg;

  typedef enum logic [1:0] {
    FLT_NONE   = 2'd0,
    FLT_STUCK0 = 2'd1,
    FLT_STUCK1 = 2'd2,
    FLT_FLIP   = 2'd3
  } fault_e;

  // Value seen on a node whose fault-free value is v when fault f is present.
  function automatic logic apply_fault(input logic v, input fault_e f);
    unique case (f)
      FLT_STUCK0: return 1'b0;
      FLT_STUCK1: return 1'b1;
      FLT_FLIP:   return ~v;
      default:    return v;
    endcase
  endfunction

endpackage
