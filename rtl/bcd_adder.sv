// Decimal (BCD) carry-propagate adder.
//
// Adds two ND-digit BCD numbers a and b and a carry-in. Each digit position
// adds its two digits and the incoming decimal carry in binary (0..19); a
// result above 9 is corrected by adding 6, which leaves the units digit in
// the low four bits and sets the decimal carry into the next position. The
// carry ripples from digit 0 to digit ND-1.
//
// The design description only says a decimal adder produces the final
// product; the ripple-carry digit adder with +6 correction is this design's
// own choice, the simplest one that does it. Purely combinational.
module bcd_adder #(
  parameter int ND = 8  // digits per operand
) (
  input  logic [ND-1:0][3:0] a,     // BCD addend
  input  logic [ND-1:0][3:0] b,     // BCD addend
  input  logic               cin,   // carry in
  output logic [ND-1:0][3:0] s,     // BCD sum
  output logic               cout   // decimal carry out
);

  logic       c;
  logic [4:0] t;

  always_comb begin
    c = cin;
    for (int k = 0; k < ND; k++) begin
      t = 5'(a[k]) + 5'(b[k]) + 5'(c);
      if (t > 5'd9) begin
        t = t + 5'd6;
        c = 1'b1;
      end else begin
        c = 1'b0;
      end
      s[k] = t[3:0];
    end
    cout = c;
  end

endmodule
