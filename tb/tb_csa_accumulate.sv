// tb_csa_accumulate -- self-checking testbench of the exact accumulation array.
//
// Drives the default 4-row, 16-bit array with directed corner values (all
// zeros, all ones, single carries that ripple across the full width) and
// with random rows, and compares the output with the integer sum of the
// rows modulo 2^16. A second instance with 2 rows of 8 bits (the 4 x 4
// multiplier's array) is checked exhaustively over all row pairs. The array
// is combinational; outputs are sampled one cycle after the inputs change.
module tb_csa_accumulate;

  localparam int unsigned ROWS = 4;
  localparam int unsigned W    = 16;

  logic                   clk = 1'b0;
  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0]           sum;
  logic [1:0][7:0]        rows_s;
  logic [7:0]             sum_s;
  int unsigned            checks = 0, failures = 0;

  csa_accumulate dut (.rows_i(rows), .sum_o(sum));
  csa_accumulate #(.ROWS(2), .W(8)) dut_small (.rows_i(rows_s), .sum_o(sum_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_big();
    longint unsigned exp_sum;
    @(posedge clk);
    exp_sum = 0;
    for (int r = 0; r < ROWS; r++) exp_sum += longint'(rows[r]);
    exp_sum &= (64'd1 << W) - 1;
    checks++;
    if (64'(sum) != exp_sum) begin
      failures++;
      if (failures < 10) $display("mismatch rows=%h got=%h exp=%h", rows, sum, exp_sum);
    end
  endtask

  initial begin : stimulus
    rows = '0;
    rows_s = '0;
    check_big();
    rows = '1;
    check_big();
    for (int i = 0; i < W; i++) begin
      rows = '0;
      rows[0] = '1;
      rows[ROWS-1] = W'(1) << i;
      check_big();
    end
    for (int r = 0; r < ROWS; r++) begin
      rows = '0;
      rows[r] = 16'hffff;
      rows[(r + 1) % ROWS] = 16'h0001;
      check_big();
    end
    for (int t = 0; t < 20000; t++) begin
      for (int r = 0; r < ROWS; r++) rows[r] = W'($urandom);
      check_big();
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        rows_s[0] = 8'(x);
        rows_s[1] = 8'(y);
        @(posedge clk);
        checks++;
        if (sum_s != 8'(x + y)) begin
          failures++;
          if (failures < 10) $display("small mismatch %0d+%0d got=%0d", x, y, sum_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
