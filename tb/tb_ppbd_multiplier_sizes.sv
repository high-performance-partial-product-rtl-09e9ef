// Testbench for ppbd_multiplier at other operand sizes: N = 1 and N = 2
// exhaustively (all 100 and 10000 operand pairs) and N = 6, the largest size
// the column converters support, with 5000 random pairs plus all-nines;
// every product is compared with the integer product.
module tb_ppbd_multiplier_sizes;
  logic [3:0]  x1, y1;
  logic [7:0]  p1;
  logic [7:0]  x2, y2;
  logic [15:0] p2;
  logic [23:0] x6, y6;
  logic [47:0] p6;
  int checks = 0, failures = 0;

  ppbd_multiplier #(.N(1)) dut1 (.x(x1), .y(y1), .p(p1));
  ppbd_multiplier #(.N(2)) dut2 (.x(x2), .y(y2), .p(p2));
  ppbd_multiplier #(.N(6)) dut6 (.x(x6), .y(y6), .p(p6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint from_bcd(input logic [47:0] v, input int nd);
    longint r = 0;
    for (int k = nd - 1; k >= 0; k--) r = r * 10 + longint'(v[4*k +: 4]);
    return r;
  endfunction

  function automatic logic [23:0] to_bcd(input longint v);
    logic [23:0] r;
    for (int k = 0; k < 6; k++) begin
      r[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    x2 = '0; y2 = '0; x6 = '0; y6 = '0;
    for (int a = 0; a < 10; a++) begin
      for (int b = 0; b < 10; b++) begin
        x1 = 4'(a);
        y1 = 4'(b);
        #1;
        check(from_bcd(48'(p1), 2), longint'(a * b), "N=1");
      end
    end
    for (int a = 0; a < 100; a++) begin
      for (int b = 0; b < 100; b++) begin
        x2 = 8'(to_bcd(a));
        y2 = 8'(to_bcd(b));
        #1;
        check(from_bcd(48'(p2), 4), longint'(a * b), "N=2");
      end
    end
    for (int t = 0; t <= 5000; t++) begin
      longint a, b;
      a = (t == 0) ? 999999 : longint'($urandom_range(999999));
      b = (t == 0) ? 999999 : longint'($urandom_range(999999));
      x6 = to_bcd(a);
      y6 = to_bcd(b);
      #1;
      check(from_bcd(p6, 12), a * b, "N=6");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
