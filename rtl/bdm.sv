// BCD digit multiplier (BDM).
//
// Multiplies two BCD digits a and b and returns the two-digit BCD product
// {h, l}. The digits are first multiplied as plain 4-bit binary numbers
// (bin_mult4x4); the product, at most 9*9 = 81, fits in seven bits and is
// converted to two BCD digits by a PPBD converter. Example: 6*2 gives binary
// 0000_1100 (12), which becomes h = 0001, l = 0010.
//
// Structure (binary multiplier followed by PPBD converter) follows the
// design description. Purely combinational. a and b must be BCD digits.
module bdm (
  input  logic [3:0] a,  // BCD digit of the multiplicand
  input  logic [3:0] b,  // BCD digit of the multiplier
  output logic [3:0] h,  // tens digit of a*b
  output logic [3:0] l   // units digit of a*b
);

  logic [7:0]      prod;
  logic [1:0][3:0] dec;
  logic            ovf;

  bin_mult4x4 u_mult (
    .a (a),
    .b (b),
    .p (prod)
  );

  ppbd_converter #(.WB(7), .ND(2)) u_conv (
    .bin      (prod[6:0]),
    .bcd      (dec),
    .overflow (ovf)
  );

  assign h = dec[1];
  assign l = dec[0];

  always_comb begin
    assert final (ovf == 1'b0 && prod[7] == 1'b0)
      else $error("bdm: inputs %0d, %0d are not BCD digits", a, b);
  end

endmodule
