// N-digit by N-digit BCD multiplier built on partial product binary-to-
// decimal (PPBD) conversion.
//
// The multiplier works in three combinational stages:
//  1. Partial product generation (pp_generation): every pair of operand
//     digits is multiplied by a BCD digit multiplier, i.e. a 4x4 binary
//     multiplier whose product (at most 81) is converted straight back to
//     two BCD digits, H and L.
//  2. Partial product reduction (pp_reduction): the H and L digits are
//     aligned by decimal weight; each column is summed in binary with
//     carry-save adders and a carry-propagate adder, and each column sum
//     (at most 63 for N = 4) is converted to two BCD digits by a second
//     PPBD converter. This gives a sum row and a carry row.
//  3. Final product computation (bcd_adder): one 2N-digit decimal addition
//     of the two rows.
// Example: 5126 x 4832 -> sum row 24557732 + carry row 00211100 = 24768832.
//
// Interface: x and y are N-digit BCD numbers, four bits per digit, least
// significant digit in bits 3:0; p is the 2N-digit BCD product in the same
// format. The default N = 4 (16-bit operands, 32-bit product) is the size
// of the design description. There is no clock: p follows x and y after the
// combinational delay. Operand digits must be 0..9.
module ppbd_multiplier #(
  parameter int N = 4  // digits per operand
) (
  input  logic [4*N-1:0] x,  // BCD multiplicand
  input  logic [4*N-1:0] y,  // BCD multiplier
  output logic [8*N-1:0] p   // BCD product
);

  logic [N-1:0][N-1:0][3:0] h, l;
  logic [2*N-1:0][3:0]      sum_row, carry_row, prod;
  logic                     cout;

  pp_generation #(.N(N)) u_gen (
    .x (x),
    .y (y),
    .h (h),
    .l (l)
  );

  pp_reduction #(.N(N)) u_red (
    .h         (h),
    .l         (l),
    .sum_row   (sum_row),
    .carry_row (carry_row)
  );

  bcd_adder #(.ND(2 * N)) u_add (
    .a    (sum_row),
    .b    (carry_row),
    .cin  (1'b0),
    .s    (prod),
    .cout (cout)
  );

  assign p = prod;

  // The product of two N-digit numbers has at most 2N digits.
  always_comb begin
    assert final (cout == 1'b0)
      else $error("ppbd_multiplier: decimal carry out of the product");
  end

endmodule
