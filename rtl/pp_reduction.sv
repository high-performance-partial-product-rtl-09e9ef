// Partial product reduction.
//
// Input: the H (tens) and L (units) BCD digits of every digit product
// x[i]*y[j] of two N-digit operands. L of (i, j) has weight 10**(i+j) and
// H has weight 10**(i+j+1), so column c of the partial product matrix holds
// the L digits of all pairs with i+j = c and the H digits of all pairs with
// i+j = c-1: at most 2N-1 digits, whose sum is at most 9*(2N-1).
//
// Each column is summed in binary by a csa_column (carry-save chain and a
// carry-propagate adder), and the binary column sum is turned into two BCD
// digits by a PPBD converter. The units digit goes to position c of the sum
// row; the tens digit goes to position c+1 of the carry row. The product is
// then sum_row + carry_row, a plain decimal addition (bcd_adder). Example:
// 5126 x 4832 gives sum row 24557732 and carry row 00211100.
//
// Column summing with CSA and CPA followed by a PPBD converter follows the
// design description; unused column positions are fed with zero digits,
// which synthesis removes. The top column (2N-1) holds a single H digit, at
// most 8, so it never produces a tens digit. Requires N <= 6 so that a
// column sum stays below 100. Purely combinational.
module pp_reduction #(
  parameter int N = 4  // digits per operand
) (
  input  logic [N-1:0][N-1:0][3:0] h,        // h[j][i]: tens digit of x[i]*y[j]
  input  logic [N-1:0][N-1:0][3:0] l,        // l[j][i]: units digit of x[i]*y[j]
  output logic [2*N-1:0][3:0]      sum_row,  // units digit of each column sum
  output logic [2*N-1:0][3:0]      carry_row // tens digits, already shifted up one place
);

  import ppbd_pkg::*;

  localparam int NC = 2 * N;        // columns
  localparam int K  = 2 * N;        // operand slots per column
  localparam int W  = col_width(N); // bits of a column sum

  // Operands of each column: slot j (< N) takes the L digit of pair
  // (i = c-j, j), slot N+j the H digit of pair (i = c-1-j, j). At most 2N-1
  // of the 2N slots are used in any column; the others are zero.
  logic [NC-1:0][K-1:0][3:0] col_ops;

  always_comb begin
    col_ops = '0;
    for (int c = 0; c < NC; c++) begin
      for (int j = 0; j < N; j++) begin
        if (c - j >= 0 && c - j < N)
          col_ops[c][j] = l[j][c-j];
        if (c - 1 - j >= 0 && c - 1 - j < N)
          col_ops[c][N+j] = h[j][c-1-j];
      end
    end
  end

  logic [NC-1:0][W-1:0]    col_sum;
  logic [NC-1:0][1:0][3:0] col_dec;
  logic [NC-1:0]           col_ovf;

  for (genvar c = 0; c < NC; c++) begin : g_col
    csa_column #(.K(K), .WIN(4), .WOUT(W)) u_csa (
      .ops (col_ops[c]),
      .sum (col_sum[c])
    );

    ppbd_converter #(.WB(W), .ND(2)) u_conv (
      .bin      (col_sum[c]),
      .bcd      (col_dec[c]),
      .overflow (col_ovf[c])
    );

    assign sum_row[c] = col_dec[c][0];
  end

  always_comb begin
    carry_row = '0;
    for (int c = 0; c < NC - 1; c++)
      carry_row[c+1] = col_dec[c][1];
  end

  // A column sum is at most 9*(2N-1) < 100, and the top column holds one
  // H digit (at most 8), so neither check can fail for BCD inputs.
  always_comb begin
    assert final (col_ovf == '0 && col_dec[NC-1][1] == 4'd0)
      else $error("pp_reduction: column sum out of range (non-BCD input digit)");
  end

  initial begin
    assert (N >= 1 && N <= 6)
      else $fatal(1, "pp_reduction: N=%0d, column sums would exceed two digits", N);
  end

endmodule
