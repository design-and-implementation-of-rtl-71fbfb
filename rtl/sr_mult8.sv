// sr_mult8: fault-tolerant unsigned array multiplier built only from
// self-repairing full adders.
//
// The product of two WIDTH-bit operands is formed by WIDTH-1 rows of WIDTH
// self-repairing full adders (56 cells for the default 8 bits). Row 0 adds
// partial product a&b[1] to the upper WIDTH-1 bits of partial product
// a&b[0]; each further row r adds a&b[r+1] to the shifted result of the row
// above, whose carry-out becomes its top bit. Each row is a ripple-carry
// chain: the repaired carry of cell j drives cin of cell j+1, as a
// self-repairing adder's final carry drives the next adder's carry input.
// Bit 0 of each row's sum is one product bit; the last row gives the upper
// half. Column 0 of every row has cin tied to 0, so the same repairing cell
// serves where a half adder would do.
//
// The 8-bit width follows the design's stated target. The array structure,
// the unprotected AND partial products and the use of a full adder where a
// half adder would do are this design's own choices.
//
// Interface: a, b operands; p = a*b. Cell k = r*WIDTH + j (row r, column j)
// takes its fault-injection inputs from flt_sum[k] / flt_cout[k] (tie to
// FLT_NONE in use) and reports det_sum[k] (fs = 0, the sum was wrong) and
// det_cout[k] (fc = 1, the carry was wrong). fault_seen is their OR. Any
// single or double output fault per cell is repaired, so p stays exact.
// Purely combinational: the result settles through up to about
// 2*WIDTH-1 cell delays, with no clock or latency.
module sr_mult8
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned NCELL = (WIDTH - 1) * WIDTH
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  fault_e [NCELL-1:0] flt_sum,
  input  fault_e [NCELL-1:0] flt_cout,
  output logic [2*WIDTH-1:0] p,
  output logic [NCELL-1:0]   det_sum,
  output logic [NCELL-1:0]   det_cout,
  output logic               fault_seen
);

  // upper[r]: the WIDTH bits that row r adds its partial product to.
  logic [WIDTH-1:0] upper [WIDTH];
  logic [WIDTH-1:0] pp    [WIDTH];
  logic [WIDTH-1:0] rsum  [WIDTH-1];
  logic [WIDTH-1:0] rcar  [WIDTH-1];
  logic [NCELL-1:0] fs_all, fc_all;

  for (genvar i = 0; i < WIDTH; i++) begin : g_pp
    assign pp[i] = a & {WIDTH{b[i]}};
  end

  assign upper[0] = {1'b0, pp[0][WIDTH-1:1]};
  assign p[0]     = pp[0][0];

  for (genvar r = 0; r < WIDTH - 1; r++) begin : g_row
    for (genvar j = 0; j < WIDTH; j++) begin : g_cell
      localparam int unsigned K = r * WIDTH + j;
      logic cin;
      if (j == 0) begin : g_c0
        assign cin = 1'b0;
      end else begin : g_cn
        assign cin = rcar[r][j-1];
      end
      self_repairing_fa u_cell (
        .a       (upper[r][j]),
        .b       (pp[r+1][j]),
        .cin     (cin),
        .flt_sum (flt_sum[K]),
        .flt_cout(flt_cout[K]),
        .sum     (rsum[r][j]),
        .cout    (rcar[r][j]),
        .fs      (fs_all[K]),
        .fc      (fc_all[K])
      );
    end
    assign p[r+1]     = rsum[r][0];
    assign upper[r+1] = {rcar[r][WIDTH-1], rsum[r][WIDTH-1:1]};
  end

  assign p[2*WIDTH-1:WIDTH] = upper[WIDTH-1];

  always_comb begin
    det_sum    = ~fs_all;
    det_cout   = fc_all;
    fault_seen = |{det_sum, det_cout};
  end

endmodule
