// csa_accumulate -- exact accumulation array of the carryless multiplier.
//
// Adds ROWS operand rows of W bits exactly, modulo 2^W. The first row seeds
// a carry-save pair (sum vector = row 0, carry vector = 0). Each further row
// is folded in by one rank of W full adders that take the running sum bit,
// the running carry bit and the new row bit of a column, leaving the sum in
// that column and the carry one column higher. A final carry-propagate
// (ripple) row of a half adder and full adders turns the sum and carry
// vectors into the result.
//
// In the multiplier this array takes the N/2 rows left after the OR merging
// and is the part of the original carry-save multiplier whose adders stay
// exact. The source design states only that these adders are left
// unchanged; the row-by-row carry-save ranks and the ripple-carry final row
// are this design's own choice of structure. Cells whose inputs are
// constant zero are left for synthesis to remove.
//
// Interface: rows_i[r] (W bits) for r = 0 .. ROWS-1, sum_o (W bits).
// Timing: purely combinational.
module csa_accumulate #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] rows_i,
  output logic [W-1:0]           sum_o
);

  if (ROWS < 1 || W < 2) begin : g_bad_size
    $error("csa_accumulate: need ROWS >= 1 and W >= 2");
  end

  // s[r], c[r]: carry-save pair after rows 0 .. r have been folded in.
  logic [ROWS-1:0][W-1:0] s;
  logic [ROWS-1:0][W-1:0] c;

  assign s[0] = rows_i[0];
  assign c[0] = '0;

  for (genvar r = 1; r < ROWS; r++) begin : g_rank
    logic [W-1:0] cout;
    for (genvar i = 0; i < W; i++) begin : g_col
      full_adder u_fa (
        .a_i    (s[r-1][i]),
        .b_i    (c[r-1][i]),
        .c_i    (rows_i[r][i]),
        .sum_o  (s[r][i]),
        .carry_o(cout[i])
      );
    end
    // Carries move one column up; the carry out of the top column falls
    // outside the W-bit result.
    assign c[r] = {cout[W-2:0], 1'b0};
  end

  // Carry-propagate row.
  logic [W-1:0] rc;   // rc[i]: carry into column i+1
  half_adder u_ha0 (
    .a_i    (s[ROWS-1][0]),
    .b_i    (c[ROWS-1][0]),
    .sum_o  (sum_o[0]),
    .carry_o(rc[0])
  );
  for (genvar i = 1; i < W; i++) begin : g_cpa
    full_adder u_fa (
      .a_i    (s[ROWS-1][i]),
      .b_i    (c[ROWS-1][i]),
      .c_i    (rc[i-1]),
      .sum_o  (sum_o[i]),
      .carry_o(rc[i])
    );
  end

endmodule
