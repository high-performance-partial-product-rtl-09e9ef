// Testbench for ppbd_converter. Checks exhaustively, against integer
// division by powers of ten:
//  - the default instance (7 bits, 2 digits) on 0..127, including the
//    overflow flag for inputs of 100 and more;
//  - the column-sum instance used in the reduction stage (6 bits, 2 digits);
//  - a wider instance (10 bits, 3 digits) on 0..1023, odd bit count.
module tb_ppbd_converter;
  int checks = 0, failures = 0;

  logic [6:0]      b7;
  logic [1:0][3:0] d7;
  logic            o7;
  logic [5:0]      b6;
  logic [1:0][3:0] d6;
  logic            o6;
  logic [9:0]      b10;
  logic [2:0][3:0] d10;
  logic            o10;

  ppbd_converter dut7 (.bin(b7), .bcd(d7), .overflow(o7));
  ppbd_converter #(.WB(6), .ND(2)) dut6 (.bin(b6), .bcd(d6), .overflow(o6));
  ppbd_converter #(.WB(10), .ND(3)) dut10 (.bin(b10), .bcd(d10), .overflow(o10));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b6 = '0;
    b10 = '0;
    for (int v = 0; v < 128; v++) begin
      b7 = 7'(v);
      #1;
      checks++;
      if (v < 100) begin
        if (o7 || int'(d7[1]) != v / 10 || int'(d7[0]) != v % 10) begin
          failures++;
          $display("FAIL 7b v=%0d: got %0d%0d ovf=%0d", v, d7[1], d7[0], o7);
        end
      end else if (!o7) begin
        failures++;
        $display("FAIL 7b v=%0d: overflow not flagged", v);
      end
    end
    for (int v = 0; v < 64; v++) begin
      b6 = 6'(v);
      #1;
      checks++;
      if (o6 || int'(d6[1]) != v / 10 || int'(d6[0]) != v % 10) begin
        failures++;
        $display("FAIL 6b v=%0d: got %0d%0d", v, d6[1], d6[0]);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      b10 = 10'(v);
      #1;
      checks++;
      if (v < 1000) begin
        if (o10 || int'(d10[2]) != v / 100 || int'(d10[1]) != (v / 10) % 10 ||
            int'(d10[0]) != v % 10) begin
          failures++;
          $display("FAIL 10b v=%0d: got %0d%0d%0d", v, d10[2], d10[1], d10[0]);
        end
      end else if (!o10) begin
        failures++;
        $display("FAIL 10b v=%0d: overflow not flagged", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
