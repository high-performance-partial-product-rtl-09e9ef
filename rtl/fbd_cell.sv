// Fast binary-to-decimal (FBD) cell.
//
// The cell takes one BCD digit bj, multiplies it by four and adds a 2-bit
// value bi: v = 4*bj + bi, which lies in 0..39 for a valid digit. It returns
// v as a BCD digit d (v mod 10) and a 2-bit decimal carry c (v div 10, 0..3).
// Because 4*bj + bi is just the 6-bit concatenation {bj, bi}, the cell only
// has to split a 6-bit value into tens and units; it does that with three
// comparisons against 10, 20 and 30 and one subtraction.
//
// The multiply-by-four-and-add function of the cell follows the design
// description; the 2-bit carry output and the comparison structure are this
// design's own choice (the smallest logic that completes the function so that
// cells can be chained digit by digit, see ppbd_converter).
//
// Purely combinational. bj must be a BCD digit (0..9); for bj > 9 the carry
// would not fit in two bits, which the assertion reports.
module fbd_cell (
  input  logic [3:0] bj,  // BCD digit to be multiplied by four
  input  logic [1:0] bi,  // 2-bit value added to 4*bj
  output logic [3:0] d,   // units digit of 4*bj + bi
  output logic [1:0] c    // tens of 4*bj + bi (0..3)
);

  logic [5:0] v;

  always_comb begin
    v = {bj, bi};
    if (v >= 6'd30) begin
      c = 2'd3;
      d = 4'(v - 6'd30);
    end else if (v >= 6'd20) begin
      c = 2'd2;
      d = 4'(v - 6'd20);
    end else if (v >= 6'd10) begin
      c = 2'd1;
      d = 4'(v - 6'd10);
    end else begin
      c = 2'd0;
      d = v[3:0];
    end
  end

  always_comb begin
    assert final (bj <= 4'd9)
      else $error("fbd_cell: input digit %0d is not BCD", bj);
  end

endmodule
