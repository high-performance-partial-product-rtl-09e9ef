// Partial product generation.
//
// An N x N array of BCD digit multipliers (bdm). The multiplier in row j,
// column i multiplies multiplicand digit x[i] by multiplier digit y[j] and
// delivers its two-digit BCD product as h[j][i] (tens) and l[j][i] (units).
// All N*N products are formed in parallel; the rows of L and H digits are
// then aligned and summed by pp_reduction.
//
// Generating every digit product with its own BDM follows the design
// description. Purely combinational, one BDM deep. Operand digits must be
// BCD (0..9).
module pp_generation #(
  parameter int N = 4  // digits per operand
) (
  input  logic [N-1:0][3:0]        x,  // multiplicand digits, x[0] least significant
  input  logic [N-1:0][3:0]        y,  // multiplier digits, y[0] least significant
  output logic [N-1:0][N-1:0][3:0] h,  // h[j][i]: tens digit of x[i]*y[j]
  output logic [N-1:0][N-1:0][3:0] l   // l[j][i]: units digit of x[i]*y[j]
);

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      bdm u_bdm (
        .a (x[i]),
        .b (y[j]),
        .h (h[j][i]),
        .l (l[j][i])
      );
    end
  end

endmodule
