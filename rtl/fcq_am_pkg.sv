// fcq_am_pkg -- constants and helper functions shared by the carryless
// partial-sum approximate multiplier and its testbenches.
//
// A Fibonacci code word, in this design, is an unsigned binary value whose
// bit pattern holds no two adjacent ones (1010_1010 is one, 0110_0000 is
// not). When at least one operand of the multiplier is such a word, OR-ing
// two neighbouring partial products never meets two ones in one column, so
// the OR equals the sum and the multiplier is exact.
//
// AM_WIDTH is the operand width of the main configuration (8 x 8). The
// functions are pure and synthesizable; the RTL uses only AM_WIDTH, the
// testbenches use the functions to build Fibonacci-coded weights the way
// the offline weight quantization does: nearest code word, largest code
// word (1010...10) as the clamp value. Ties between two equally near code
// words go to the smaller one; that tie rule is this design's own choice.
package fcq_am_pkg;

  // Operand width of the multiplier in its main configuration.
  localparam int unsigned AM_WIDTH = 8;

  // True when v has no two adjacent ones in its low `width` bits.
  function automatic logic is_fib_code(input logic [63:0] v, input int unsigned width);
    logic [63:0] m;
    m = (width >= 64) ? '1 : ((64'd1 << width) - 64'd1);
    return ((v & m) & ((v & m) >> 1)) == 64'd0;
  endfunction

  // Largest Fibonacci code word of `width` bits: '10' repeated from the MSB.
  function automatic logic [63:0] fib_max(input int unsigned width);
    logic [63:0] r;
    r = '0;
    for (int unsigned i = 0; i < width; i++)
      if (((width - 1 - i) % 2) == 0) r[i] = 1'b1;
    return r;
  endfunction

  // Nearest Fibonacci code word of `width` bits (width <= 16, so the search
  // over all values stays short). Values above fib_max() land on fib_max().
  function automatic logic [63:0] fib_quantize(input logic [63:0] v, input int unsigned width);
    logic [63:0] best;
    logic [63:0] best_d;
    logic [63:0] d;
    best   = '0;
    best_d = '1;
    for (int unsigned c = 0; c < (32'd1 << width); c++) begin
      if (is_fib_code(64'(c), width)) begin
        d = (64'(c) > v) ? (64'(c) - v) : (v - 64'(c));
        if (d < best_d) begin
          best_d = d;
          best   = 64'(c);
        end
      end
    end
    return best;
  endfunction

endpackage
