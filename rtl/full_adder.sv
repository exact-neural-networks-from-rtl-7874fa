// full_adder -- one-bit full adder cell of the exact accumulation array.
// sum_o = a ^ b ^ c, carry_o = majority(a, b, c). Purely combinational.
module full_adder (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic sum_o,
  output logic carry_o
);
  always_comb begin
    sum_o   = a_i ^ b_i ^ c_i;
    carry_o = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
  end
endmodule
