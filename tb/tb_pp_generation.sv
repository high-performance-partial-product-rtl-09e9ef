// Testbench for pp_generation at N = 4: the digits of 5126 x 4832 and 2000
// random operand pairs; every h[j][i], l[j][i] is compared with the tens and
// units of x[i]*y[j] computed with integers.
module tb_pp_generation;
  localparam int N = 4;
  logic [N-1:0][3:0]        x, y;
  logic [N-1:0][N-1:0][3:0] h, l;
  int checks = 0, failures = 0;

  pp_generation dut (.x(x), .y(y), .h(h), .l(l));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        int pr;
        pr = int'(x[i]) * int'(y[j]);
        checks++;
        if (int'(h[j][i]) != pr / 10 || int'(l[j][i]) != pr % 10) begin
          failures++;
          $display("FAIL x[%0d]=%0d y[%0d]=%0d: got %0d%0d", i, x[i], j, y[j],
                   h[j][i], l[j][i]);
        end
      end
    end
  endtask

  initial begin
    x = 16'h5126;
    y = 16'h4832;
    #1;
    check_all();
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < N; k++) begin
        x[k] = 4'($urandom_range(9));
        y[k] = 4'($urandom_range(9));
      end
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
