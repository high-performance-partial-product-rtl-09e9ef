// Testbench for pp_reduction at N = 4. The H and L digit matrices are driven
// directly: first those of 5126 x 4832 (expected sum row 24557732, carry
// row 00211100), then all-nines digits (largest column sums), then random
// digits. The expected rows come from column sums formed here with integers.
module tb_pp_reduction;
  localparam int N = 4;
  logic [N-1:0][N-1:0][3:0] h, l;
  logic [2*N-1:0][3:0]      sum_row, carry_row;
  int checks = 0, failures = 0;

  pp_reduction dut (.h(h), .l(l), .sum_row(sum_row), .carry_row(carry_row));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    int col[2*N+1];
    for (int c = 0; c <= 2 * N; c++) col[c] = 0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        col[i+j]   += int'(l[j][i]);
        col[i+j+1] += int'(h[j][i]);
      end
    end
    for (int c = 0; c < 2 * N; c++) begin
      int want_c;
      want_c = (c == 0) ? 0 : col[c-1] / 10;
      checks++;
      if (int'(sum_row[c]) != col[c] % 10 || int'(carry_row[c]) != want_c) begin
        failures++;
        $display("FAIL column %0d: sum %0d carry %0d, want %0d %0d", c,
                 sum_row[c], carry_row[c], col[c] % 10, want_c);
      end
    end
  endtask

  initial begin
    // Digit products of 5126 (x) and 4832 (y): row j is y[j] times x.
    int xd[N] = '{6, 2, 1, 5};
    int yd[N] = '{2, 3, 8, 4};
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        h[j][i] = 4'((xd[i] * yd[j]) / 10);
        l[j][i] = 4'((xd[i] * yd[j]) % 10);
      end
    end
    #1;
    check_rows();
    checks++;
    if (sum_row != 32'h2455_7732 || carry_row != 32'h0021_1100) begin
      failures++;
      $display("FAIL example: sum row %h carry row %h", sum_row, carry_row);
    end
    h = {N * N{4'd9}};
    l = {N * N{4'd9}};
    #1;
    check_rows();
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) begin
          h[j][i] = 4'($urandom_range(8));
          l[j][i] = 4'($urandom_range(9));
        end
      end
      #1;
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
