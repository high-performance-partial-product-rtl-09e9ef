// Testbench for csa_column: the default instance (7 four-bit operands,
// 6-bit sum) with operands 0..9 as in a digit column, and a second instance
// (8 operands of 4 bits, 7-bit sum) with full-range operands; both against
// the integer sum.
module tb_csa_column;
  logic [6:0][3:0] ops7;
  logic [5:0]      sum7;
  logic [7:0][3:0] ops8;
  logic [6:0]      sum8;
  int checks = 0, failures = 0;

  csa_column dut7 (.ops(ops7), .sum(sum7));
  csa_column #(.K(8), .WIN(4), .WOUT(7)) dut8 (.ops(ops8), .sum(sum8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ref7, ref8;
      ref7 = 0;
      ref8 = 0;
      for (int k = 0; k < 7; k++) begin
        ops7[k] = (t == 0) ? 4'd9 : 4'($urandom_range(9));
        ref7 += int'(ops7[k]);
      end
      for (int k = 0; k < 8; k++) begin
        ops8[k] = (t == 0) ? 4'd15 : 4'($urandom_range(15));
        ref8 += int'(ops8[k]);
      end
      #1;
      checks += 2;
      if (int'(sum7) != ref7) begin
        failures++;
        $display("FAIL K=7: got %0d want %0d", sum7, ref7);
      end
      if (int'(sum8) != ref8) begin
        failures++;
        $display("FAIL K=8: got %0d want %0d", sum8, ref8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
