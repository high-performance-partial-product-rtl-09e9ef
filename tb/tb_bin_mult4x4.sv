// Testbench for bin_mult4x4: all 256 operand pairs against the integer
// product, including the 6 x 2 = 12 example of one digit pair.
module tb_bin_mult4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  bin_mult4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        a = 4'(va);
        b = 4'(vb);
        #1;
        checks++;
        if (int'(p) != va * vb) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", va, vb, p);
        end
      end
    end
    a = 4'd6;
    b = 4'd2;
    #1;
    checks++;
    if (p != 8'b0000_1100) begin
      failures++;
      $display("FAIL 6*2: got %b", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
