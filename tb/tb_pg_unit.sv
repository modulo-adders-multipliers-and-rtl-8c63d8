// tb_pg_unit: random check of the bit-level propagate/generate signals: for every bit
// the two-bit sum x_i + y_i must equal 2 g_i + p_i.
module tb_pg_unit;
  localparam int N = 16;
  logic [N-1:0] x, y, p, g;
  int checks = 0, failures = 0;

  pg_unit #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x = N'($urandom);
      y = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (2 * int'(g[i]) + int'(p[i]) != int'(x[i]) + int'(y[i])) begin
          failures++;
          $display("FAIL bit %0d x=%h y=%h", i, x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
