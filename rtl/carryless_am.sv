// carryless_am -- N x N carryless partial-sum approximate multiplier.
//
// An unsigned array multiplier in which the first level of partial-product
// addition is done without carries: neighbouring partial products
// (a AND b[2k]) << 2k and (a AND b[2k+1]) << (2k+1) are merged with OR
// gates (pp_or_reduce), and only the N/2 merged rows are added exactly
// (csa_accumulate). For 8 x 8 this replaces 28 of the 48 full adders of a
// carry-save array multiplier with OR gates.
//
// Accuracy: the OR loses a carry only where both partial products of a pair
// hold a one in the same column. If either operand has no two adjacent ones
// in its binary form (a Fibonacci code word; 55 such 8-bit values, the
// largest 170 = 1010_1010) the product is exact, whichever operand it is.
// Otherwise the result is never above the true product; over all 8-bit
// operand pairs the mean relative error distance is about 0.054.
// Example: 11 x 11 gives 119 (both operands have adjacent ones), 10 x 11
// gives the exact 110.
//
// Operands are unsigned, as in the source design's asymmetric weight
// quantization (weights 0 .. 2^N-1, Fibonacci-coded). The OR merging, the
// pairing and the exact accumulation follow the source design; the
// structure of the exact adder array is this design's own (see
// csa_accumulate).
//
// Interface: a_i, b_i (N bits), p_o (2N bits). N must be even.
// Timing: purely combinational, no clock and no reset.
module carryless_am #(
  parameter int unsigned N = fcq_am_pkg::AM_WIDTH
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  output logic [2*N-1:0] p_o
);

  logic [N/2-1:0][2*N-1:0] rows;

  pp_or_reduce #(.N(N)) u_or (
    .a_i   (a_i),
    .b_i   (b_i),
    .rows_o(rows)
  );

  csa_accumulate #(.ROWS(N / 2), .W(2 * N)) u_acc (
    .rows_i(rows),
    .sum_o (p_o)
  );

endmodule
