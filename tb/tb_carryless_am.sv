// tb_carryless_am -- end-to-end testbench of the 8 x 8 carryless multiplier
// at its default parameters.
//
// Phase 1 sweeps all 65,536 operand pairs and checks, against values built
// here with integer arithmetic only:
//   * every product equals the reference carryless product, the sum over k
//     of ((a*b[2k]) << 2k) OR ((a*b[2k+1]) << (2k+1));
//   * the product is exact whenever a or b is a Fibonacci code word (no two
//     adjacent ones), and it is never above the exact product otherwise;
//   * the mean relative error distance over all pairs with a nonzero
//     product lies in [0.050, 0.060] (the design target is about 0.054);
//   * there are 55 Fibonacci code words of 8 bits and the largest is 170.
// Phase 2 runs small neural-network dot products: 64 weights drawn at
// random over 0..255 are quantized to their nearest Fibonacci code word
// (values above 170 clamp to 170), multiplied by random 8-bit activations
// through the multiplier and accumulated; the accumulated result must
// equal the exact dot product.
// Mechanisms counted, each of which must occur: exact through a Fibonacci
// multiplicand, exact through a Fibonacci multiplier, an approximation
// error (lost carry) with two non-Fibonacci operands, and a weight clamped
// to the largest code word. The multiplier is combinational; every product
// is sampled one clock after its operands are applied, so each product
// takes one testbench cycle.
module tb_carryless_am;
  import fcq_am_pkg::*;

  localparam int unsigned N      = AM_WIDTH;
  localparam int unsigned TAPS   = 64;
  localparam int unsigned DOTS   = 200;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int unsigned    checks = 0, failures = 0;
  int unsigned    n_exact_a = 0, n_exact_b = 0, n_error = 0, n_clamped = 0;
  int unsigned    n_fib = 0;
  real            red_sum = 0.0;
  int unsigned    red_cnt = 0;

  carryless_am dut (.a_i(a), .b_i(b), .p_o(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  function automatic longint unsigned ref_carryless(input int unsigned x, input int unsigned y);
    longint unsigned acc = 0;
    for (int k = 0; k < N / 2; k++)
      acc += ((longint'(x) * ((y >> (2 * k)) & 1)) << (2 * k)) |
             ((longint'(x) * ((y >> (2 * k + 1)) & 1)) << (2 * k + 1));
    return acc;
  endfunction

  initial begin : stimulus
    longint unsigned t0;
    longint unsigned exact, approx;
    real mred;
    logic fa, fb;

    // Code-word census.
    for (int v = 0; v < (1 << N); v++) if (is_fib_code(64'(v), N)) n_fib++;
    checks++;
    if (n_fib != 55) fail($sformatf("expected 55 code words, counted %0d", n_fib));
    checks++;
    if (fib_max(N) != 64'd170) fail("largest code word is not 170");

    // Phase 1: exhaustive sweep.
    @(posedge clk);
    t0 = longint'($time);
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        @(posedge clk);
        exact  = longint'(ia) * longint'(ib);
        approx = ref_carryless(ia, ib);
        fa = is_fib_code(64'(ia), N);
        fb = is_fib_code(64'(ib), N);
        checks++;
        if (64'(p) != approx)
          fail($sformatf("a=%0d b=%0d got %0d, carryless reference %0d", ia, ib, p, approx));
        checks++;
        if (64'(p) > exact) fail($sformatf("a=%0d b=%0d product above exact", ia, ib));
        if (fa || fb) begin
          checks++;
          if (64'(p) != exact) fail($sformatf("a=%0d b=%0d Fibonacci operand but %0d != %0d", ia, ib, p, exact));
          if (fa) n_exact_a++;
          if (fb) n_exact_b++;
        end else if (64'(p) != exact) begin
          n_error++;
        end
        if (exact != 0) begin
          red_sum += real'(exact - 64'(p)) / real'(exact);
          red_cnt++;
        end
      end
    end
    // One product per cycle.
    checks++;
    if ((longint'($time) - t0) / 10 != (1 << (2 * N)))
      fail($sformatf("sweep took %0d cycles", (longint'($time) - t0) / 10));
    mred = red_sum / real'(red_cnt);
    $display("MRED over %0d nonzero products: %f", red_cnt, mred);
    checks++;
    if (mred < 0.050 || mred > 0.060) fail("MRED outside [0.050, 0.060]");

    // Phase 2: Fibonacci-quantized dot products.
    for (int d = 0; d < DOTS; d++) begin
      longint unsigned acc_am, acc_ex;
      int unsigned w_raw, w_q, x;
      acc_am = 0;
      acc_ex = 0;
      for (int t = 0; t < TAPS; t++) begin
        w_raw = $urandom_range(255, 0);
        w_q   = int'(fib_quantize(64'(w_raw), N));
        if (w_raw > 170) begin
          n_clamped++;
          checks++;
          if (w_q != 170) fail($sformatf("weight %0d not clamped to 170", w_raw));
        end
        x = $urandom_range(255, 0);
        a = N'(w_q);
        b = N'(x);
        @(posedge clk);
        acc_am += 64'(p);
        acc_ex += longint'(w_q) * longint'(x);
      end
      checks++;
      if (acc_am != acc_ex) fail($sformatf("dot product %0d: %0d != %0d", d, acc_am, acc_ex));
    end

    $display("exact via Fibonacci a: %0d, via Fibonacci b: %0d, approximation errors: %0d, clamped weights: %0d",
             n_exact_a, n_exact_b, n_error, n_clamped);
    checks++;
    if (n_exact_a == 0) fail("no exact product through a Fibonacci multiplicand");
    checks++;
    if (n_exact_b == 0) fail("no exact product through a Fibonacci multiplier");
    checks++;
    if (n_error == 0) fail("approximation error never occurred");
    checks++;
    if (n_clamped == 0) fail("no weight was clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
