// tb_pp_or_reduce -- self-checking testbench of the partial-product OR stage.
//
// Sweeps all 8 x 8 operand pairs. For each pair it rebuilds every merged row
// with integer arithmetic, (a*b[2k]) << 2k OR (a*b[2k+1]) << (2k+1), and
// compares it with the block. It also checks the property the stage exists
// for: when either operand has no two adjacent ones, each merged row equals
// the arithmetic sum of its two partial products, and it counts pairs where
// the OR differs from the sum (a lost carry). The stage is combinational, so
// each pair is checked one cycle after it is applied.
module tb_pp_or_reduce;
  import fcq_am_pkg::*;

  localparam int unsigned N = 8;

  logic                    clk = 1'b0;
  logic [N-1:0]            a, b;
  logic [N/2-1:0][2*N-1:0] rows;
  int unsigned             checks = 0, failures = 0, lost_carry = 0;

  pp_or_reduce #(.N(N)) dut (.a_i(a), .b_i(b), .rows_o(rows));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint unsigned pe, po, exp_row;
    logic fib;
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        @(posedge clk);
        fib = is_fib_code(64'(ia), N) || is_fib_code(64'(ib), N);
        for (int k = 0; k < N / 2; k++) begin
          pe = longint'(ia) * ((ib >> (2 * k)) & 1) << (2 * k);
          po = longint'(ia) * ((ib >> (2 * k + 1)) & 1) << (2 * k + 1);
          exp_row = pe | po;
          checks++;
          if (64'(rows[k]) != exp_row) begin
            failures++;
            if (failures < 10)
              $display("row mismatch a=%0d b=%0d k=%0d got=%0h exp=%0h", ia, ib, k, rows[k], exp_row);
          end
          if (exp_row != pe + po) lost_carry++;
          if (fib) begin
            checks++;
            if (64'(rows[k]) != pe + po) begin
              failures++;
              if (failures < 10)
                $display("Fibonacci operand but OR != sum a=%0d b=%0d k=%0d", ia, ib, k);
            end
          end
        end
      end
    end
    // The approximation must actually occur for some non-Fibonacci pairs.
    checks++;
    if (lost_carry == 0) begin
      failures++;
      $display("no lost carry seen");
    end
    $display("pairs with a lost carry in some row: %0d", lost_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
