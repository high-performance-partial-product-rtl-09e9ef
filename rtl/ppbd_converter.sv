// Partial product binary-to-decimal (PPBD) converter.
//
// Converts a WB-bit unsigned binary number into ND BCD digits. The binary
// input is consumed two bits at a time, most significant pair first. A BCD
// accumulator, initially zero, is updated once per pair as acc = 4*acc + pair.
// One row of ND fbd_cell instances performs that update: the cell of digit 0
// receives the new bit pair as its 2-bit addend and each further cell receives
// the 2-bit decimal carry of the cell below it. After ceil(WB/2) rows the
// accumulator holds the decimal value of the input. Every intermediate value
// is no larger than the final one, so no row overflows as long as the input
// is below 10**ND; overflow is raised otherwise.
//
// Building the converter from FBD cells follows the design description; the
// row-per-bit-pair arrangement is this design's own choice. The defaults (7
// bits, 2 digits) are those of the BCD digit multiplier, whose product of
// two digits is at most 81.
//
// Purely combinational: ceil(WB/2) cell rows deep.
module ppbd_converter #(
  parameter int WB = 7,  // width of the binary input
  parameter int ND = 2   // number of BCD output digits
) (
  input  logic [WB-1:0]        bin,      // binary value
  output logic [ND-1:0][3:0]   bcd,      // BCD value, digit 0 least significant
  output logic                 overflow  // input is 10**ND or larger
);

  localparam int S = (WB + 1) / 2;  // number of bit pairs (cell rows)

  logic [2*S-1:0] padded;
  logic [S:0][ND-1:0][3:0] acc;     // accumulator before row k
  logic [S-1:0][ND:0][1:0] cy;      // carries inside row k
  logic [S-1:0]            row_ovf;

  assign padded = (2 * S)'(bin);
  assign acc[0] = '0;

  for (genvar k = 0; k < S; k++) begin : g_row
    assign cy[k][0] = padded[2*(S-1-k) +: 2];
    for (genvar m = 0; m < ND; m++) begin : g_digit
      fbd_cell u_cell (
        .bj (acc[k][m]),
        .bi (cy[k][m]),
        .d  (acc[k+1][m]),
        .c  (cy[k][m+1])
      );
    end
    assign row_ovf[k] = |cy[k][ND];
  end

  assign bcd      = acc[S];
  assign overflow = |row_ovf;

endmodule
