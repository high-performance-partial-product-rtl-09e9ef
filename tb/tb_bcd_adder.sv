// Testbench for bcd_adder at its default width of 8 digits: fixed cases
// (the final addition 24557732 + 00211100, 99999999 + 1 for a full carry
// ripple and carry out) and random BCD operands with random carry-in,
// against integer addition.
module tb_bcd_adder;
  localparam int ND = 8;
  logic [ND-1:0][3:0] a, b, s;
  logic               cin, cout;
  int checks = 0, failures = 0;

  bcd_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint to_int(input logic [ND-1:0][3:0] v);
    longint r = 0;
    for (int k = ND - 1; k >= 0; k--) r = r * 10 + longint'(v[k]);
    return r;
  endfunction

  function automatic logic [ND-1:0][3:0] to_bcd(input longint v);
    logic [ND-1:0][3:0] r;
    for (int k = 0; k < ND; k++) begin
      r[k] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic apply(input longint va, input longint vb, input bit c);
    longint want;
    a = to_bcd(va);
    b = to_bcd(vb);
    cin = c;
    #1;
    want = va + vb + longint'(c);
    checks++;
    if (to_int(s) != want % 100000000 || cout != (want >= 100000000)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: got %h carry %0d", va, vb, c, s, cout);
    end
  endtask

  initial begin
    apply(24557732, 211100, 1'b0);
    checks++;
    if (s != 32'h2476_8832) begin
      failures++;
      $display("FAIL example: got %h", s);
    end
    apply(99999999, 1, 1'b0);
    apply(99999999, 99999999, 1'b1);
    apply(0, 0, 1'b0);
    for (int t = 0; t < 3000; t++) begin
      apply(longint'($urandom_range(99999999)), longint'($urandom_range(99999999)),
            1'($urandom_range(1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
