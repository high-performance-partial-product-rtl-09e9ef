// End-to-end testbench for ppbd_multiplier at its default size (4-digit
// operands, 8-digit product), no parameters overridden.
//
// Checks the worked example 5126 x 4832 = 24768832, the corner cases 0, 1
// and 9999 x 9999, the products of 9999 with powers of ten and their
// neighbours, and 20000 random BCD operand pairs, each against the integer
// product. Alongside, it works out from the operands the intermediate
// quantities of the algorithm and counts how often each mechanism of the
// design is exercised; a mechanism that never occurs is a failure:
//   two_digit_pp  a digit product of 10 or more (BDM outputs a non-zero H)
//   col_carry     a column sum of 10 or more (a non-zero carry-row digit)
//   col_high      a column sum of 40 or more (near the largest that occurs;
//                1779 x 1778 reaches 50)
//   dec_correct   a digit position of the final decimal addition above 9
//   carry_chain   a decimal carry that makes the next position exceed 9
module tb_ppbd_multiplier;
  localparam int N = 4;
  logic [4*N-1:0] x, y;
  logic [8*N-1:0] p;
  int checks = 0, failures = 0;
  int two_digit_pp = 0, col_carry = 0, col_high = 0, dec_correct = 0, carry_chain = 0;

  ppbd_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint bcd_to_int(input logic [8*N-1:0] v, input int nd);
    longint r = 0;
    for (int k = nd - 1; k >= 0; k--) r = r * 10 + longint'(v[4*k +: 4]);
    return r;
  endfunction

  function automatic logic [4*N-1:0] int_to_bcd(input int v);
    logic [4*N-1:0] r;
    for (int k = 0; k < N; k++) begin
      r[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // Reference model of the intermediate rows, from the operand digits.
  task automatic count_mechanisms(input int xv, input int yv);
    int xd[N], yd[N], col[2*N+1], srow[2*N], crow[2*N];
    int c, t;
    bit corrected;
    for (int k = 0; k < N; k++) begin
      xd[k] = (xv / (10 ** k)) % 10;
      yd[k] = (yv / (10 ** k)) % 10;
    end
    for (int k = 0; k <= 2 * N; k++) col[k] = 0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        if (xd[i] * yd[j] >= 10) two_digit_pp++;
        col[i+j]   += (xd[i] * yd[j]) % 10;
        col[i+j+1] += (xd[i] * yd[j]) / 10;
      end
    end
    for (int k = 0; k < 2 * N; k++) begin
      if (col[k] >= 10) col_carry++;
      if (col[k] >= 40) col_high++;
      srow[k] = col[k] % 10;
      crow[k] = (k == 0) ? 0 : col[k-1] / 10;
    end
    c = 0;
    for (int k = 0; k < 2 * N; k++) begin
      t = srow[k] + crow[k] + c;
      corrected = (t > 9);
      if (corrected) dec_correct++;
      if (corrected && c == 1 && srow[k] + crow[k] == 9) carry_chain++;
      c = corrected ? 1 : 0;
    end
  endtask

  task automatic apply(input int xv, input int yv);
    longint want;
    x = int_to_bcd(xv);
    y = int_to_bcd(yv);
    #1;
    want = longint'(xv) * longint'(yv);
    checks++;
    if (bcd_to_int(p, 2 * N) != want) begin
      failures++;
      $display("FAIL %0d x %0d: got %h, want %0d", xv, yv, p, want);
    end
    for (int k = 0; k < 2 * N; k++) begin
      if (p[4*k +: 4] > 4'd9) begin
        failures++;
        $display("FAIL %0d x %0d: product digit %0d is not BCD", xv, yv, k);
      end
    end
    count_mechanisms(xv, yv);
  endtask

  initial begin
    apply(5126, 4832);
    checks++;
    if (p != 32'h2476_8832) begin
      failures++;
      $display("FAIL worked example: got %h", p);
    end
    apply(0, 0);
    apply(9999, 0);
    apply(1, 9999);
    apply(9999, 9999);
    apply(1779, 1778);
    for (int k = 0; k < N; k++) begin
      apply(9999, 10 ** k);
      apply(9999, 10 ** (k + 1) - 1);
    end
    for (int t = 0; t < 20000; t++) begin
      apply(int'($urandom_range(9999)), int'($urandom_range(9999)));
    end
    $display("mechanisms: two_digit_pp=%0d col_carry=%0d col_high=%0d dec_correct=%0d carry_chain=%0d",
             two_digit_pp, col_carry, col_high, dec_correct, carry_chain);
    checks++;
    if (two_digit_pp == 0 || col_carry == 0 || col_high == 0 || dec_correct == 0 ||
        carry_chain == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
