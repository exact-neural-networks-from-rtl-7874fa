// pp_or_reduce -- partial-product generation and carryless OR merging.
//
// An N x N unsigned array multiplier forms N partial products
// pp[i] = (a_i AND b_i[i]) << i. Instead of adding neighbouring partial
// products with full adders, this stage merges each pair (pp[2k], pp[2k+1])
// with OR gates into a single row, row[k] = pp[2k] | pp[2k+1]. The two
// partial products of a pair overlap in N-1 columns, so every pair costs
// N-1 OR gates and the stage (N/2)(N-1) = (N^2-N)/2 of them: 28 for 8 x 8,
// the full adders that the carry-save array no longer needs.
//
// The OR is the exact sum whenever the two partial products never hold a
// one in the same column. That is the case when a_i has no two adjacent
// ones (the copy and its one-place shift are disjoint) or when b_i has no
// two adjacent ones (one member of every pair is zero).
//
// Pairing of partial products (0 with 1, 2 with 3, ...) and the use of OR
// rather than XOR follow the source design. The rows are returned already
// shifted to their weight, 2N bits wide, which is this design's own way of
// handing them to the accumulation array.
//
// Interface: a_i, b_i (N bits each, unsigned), rows_o[k] (2N bits),
// k = 0 .. N/2-1. Timing: purely combinational.
module pp_or_reduce #(
  parameter int unsigned N = fcq_am_pkg::AM_WIDTH
) (
  input  logic [N-1:0]             a_i,
  input  logic [N-1:0]             b_i,
  output logic [N/2-1:0][2*N-1:0]  rows_o
);

  if ((N % 2) != 0 || N < 2) begin : g_bad_width
    $error("pp_or_reduce: N must be even and at least 2");
  end

  for (genvar k = 0; k < N / 2; k++) begin : g_pair
    logic [N-1:0] pp_even;   // a_i AND b_i[2k],   weight 2^(2k)
    logic [N-1:0] pp_odd;    // a_i AND b_i[2k+1], weight 2^(2k+1)
    logic [N:0]   merged;    // pair merged at weight 2^(2k)

    always_comb begin
      pp_even = a_i & {N{b_i[2*k]}};
      pp_odd  = a_i & {N{b_i[2*k+1]}};
      // Column 0 holds only pp_even, column N only pp_odd; the N-1
      // columns between are the OR gates that replace full adders.
      merged       = '0;
      merged[0]    = pp_even[0];
      merged[N]    = pp_odd[N-1];
      for (int unsigned j = 1; j < N; j++)
        merged[j] = pp_even[j] | pp_odd[j-1];
      rows_o[k] = (2*N)'(merged) << (2 * k);
    end
  end

endmodule
