// Testbench for fbd_cell: applies every BCD digit bj (0..9) with every 2-bit
// addend bi (0..3) and checks that {c, d} is the two-digit decimal form of
// 4*bj + bi, computed here with integer division.
module tb_fbd_cell;
  logic [3:0] bj, d;
  logic [1:0] bi, c;
  int checks = 0, failures = 0;

  fbd_cell dut (.bj(bj), .bi(bi), .d(d), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vj = 0; vj < 10; vj++) begin
      for (int vi = 0; vi < 4; vi++) begin
        int v;
        bj = 4'(vj);
        bi = 2'(vi);
        #1;
        v = 4 * vj + vi;
        checks++;
        if (int'(d) != v % 10 || int'(c) != v / 10) begin
          failures++;
          $display("FAIL bj=%0d bi=%0d: got c=%0d d=%0d, want %0d", vj, vi, c, d, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
