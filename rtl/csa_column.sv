// Column adder: carry-save chain plus carry-propagate adder.
//
// Adds K unsigned WIN-bit operands and returns their WOUT-bit sum. The
// operands are folded one by one into a redundant (sum, carry) pair with
// 3:2 carry-save stages: a bitwise full adder whose carries are shifted one
// place left. No carry ripples until the end, where a single carry-propagate
// adder turns the pair into the binary result. In the multiplier each
// partial product column (up to 2N-1 BCD digits) is summed this way.
//
// The use of carry-save and carry-propagate adders follows the design
// description; the linear chain (rather than a tree) is this design's own
// choice, since a column holds at most seven digits at the default size.
// WOUT must be wide enough for K*(2**WIN-1), or for the largest sum that can
// actually occur. Purely combinational.
module csa_column #(
  parameter int K    = 7,  // number of operands
  parameter int WIN  = 4,  // width of each operand
  parameter int WOUT = 6   // width of the sum
) (
  input  logic [K-1:0][WIN-1:0] ops,  // operands
  output logic [WOUT-1:0]       sum   // sum of all operands, modulo 2**WOUT
);

  logic [WOUT-1:0] s, c, x, s_n, c_n;

  always_comb begin
    s = '0;
    c = '0;
    for (int i = 0; i < K; i++) begin
      x   = WOUT'(ops[i]);
      s_n = s ^ c ^ x;
      c_n = ((s & c) | (s & x) | (c & x)) << 1;
      s   = s_n;
      c   = c_n;
    end
    sum = s + c;
  end

endmodule
