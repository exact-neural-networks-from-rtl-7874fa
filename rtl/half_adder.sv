// half_adder -- one-bit half adder cell of the exact accumulation array.
// sum_o = a ^ b, carry_o = a & b. Purely combinational.
module half_adder (
  input  logic a_i,
  input  logic b_i,
  output logic sum_o,
  output logic carry_o
);
  always_comb begin
    sum_o   = a_i ^ b_i;
    carry_o = a_i & b_i;
  end
endmodule
