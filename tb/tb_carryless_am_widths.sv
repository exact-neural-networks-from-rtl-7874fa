// tb_carryless_am_widths -- the carryless multiplier at other operand widths.
//
// 4 x 4: all 256 operand pairs against the integer carryless reference, and
// the worked examples of the design: 1010 x 1101 = 1000_0010 (130, exact,
// 1010 is a code word), 11 x 11 = 119 (lost carry, exact 121) and
// 10 x 11 = 110 (exact). 16 x 16: random operand pairs against the
// reference, plus random pairs where one operand is forced to a Fibonacci
// code word (adjacent ones cleared), which must give the exact product.
// Products are sampled one clock after the operands change.
module tb_carryless_am_widths;
  import fcq_am_pkg::*;

  logic        clk = 1'b0;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int unsigned checks = 0, failures = 0;

  carryless_am #(.N(4))  dut4  (.a_i(a4),  .b_i(b4),  .p_o(p4));
  carryless_am #(.N(16)) dut16 (.a_i(a16), .b_i(b16), .p_o(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_carryless(input int unsigned n,
                                                    input longint unsigned x,
                                                    input longint unsigned y);
    longint unsigned acc = 0;
    for (int unsigned k = 0; k < n / 2; k++)
      acc += ((x * ((y >> (2 * k)) & 1)) << (2 * k)) |
             ((x * ((y >> (2 * k + 1)) & 1)) << (2 * k + 1));
    return acc;
  endfunction

  // Clear every bit whose lower neighbour is set: the result has no two
  // adjacent ones.
  function automatic logic [15:0] make_fib(input logic [15:0] v);
    logic [15:0] r;
    r = v;
    for (int i = 1; i < 16; i++) if (r[i-1]) r[i] = 1'b0;
    return r;
  endfunction

  task automatic check4(input int x, input int y, input int expected);
    a4 = 4'(x);
    b4 = 4'(y);
    @(posedge clk);
    checks++;
    if (int'(p4) != expected) begin
      failures++;
      $display("4-bit %0d x %0d: got %0d expected %0d", x, y, p4, expected);
    end
  endtask

  initial begin : stimulus
    logic [15:0] x, y;
    check4(10, 13, 130);
    check4(11, 11, 119);
    check4(10, 11, 110);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check4(i, j, int'(ref_carryless(4, longint'(i), longint'(j))));

    for (int t = 0; t < 20000; t++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      a16 = x;
      b16 = y;
      @(posedge clk);
      checks++;
      if (64'(p16) != ref_carryless(16, 64'(x), 64'(y))) begin
        failures++;
        if (failures < 10) $display("16-bit %0d x %0d: got %0d", x, y, p16);
      end
      a16 = (t % 2 == 0) ? make_fib(x) : x;
      b16 = (t % 2 == 0) ? y : make_fib(y);
      @(posedge clk);
      checks++;
      if (!is_fib_code(64'(a16), 16) && !is_fib_code(64'(b16), 16)) begin
        failures++;
        $display("operand construction failed");
      end
      if (64'(p16) != longint'(a16) * longint'(b16)) begin
        failures++;
        if (failures < 10) $display("16-bit Fibonacci %0d x %0d: got %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
