// Testbench for bdm: all 100 pairs of BCD digits; the expected tens and units
// digits of a*b are formed here with integer division.
module tb_bdm;
  logic [3:0] a, b, h, l;
  int checks = 0, failures = 0;

  bdm dut (.a(a), .b(b), .h(h), .l(l));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 10; va++) begin
      for (int vb = 0; vb < 10; vb++) begin
        a = 4'(va);
        b = 4'(vb);
        #1;
        checks++;
        if (int'(h) != (va * vb) / 10 || int'(l) != (va * vb) % 10) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d%0d", va, vb, h, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
