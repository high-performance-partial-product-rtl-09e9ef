// Conventional 4x4 unsigned binary array multiplier.
//
// Each bit b[i] of the multiplier gates the multiplicand a into a partial
// product row (a AND b[i]), which is shifted left by i places; the four rows
// are summed to give the 8-bit product. This is the textbook shift-and-add
// array the design description shows for one digit pair.
//
// Purely combinational.
module bin_mult4x4 (
  input  logic [3:0] a,  // multiplicand
  input  logic [3:0] b,  // multiplier
  output logic [7:0] p   // product a*b
);

  logic [3:0][7:0] row;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      row[i] = 8'(a & {4{b[i]}}) << i;
    end
    p = row[0] + row[1] + row[2] + row[3];
  end

endmodule
