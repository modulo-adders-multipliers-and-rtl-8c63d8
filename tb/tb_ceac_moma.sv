// tb_ceac_moma: the CSA-with-CEAC Wallace tree for the operand counts of the modulo
// 2^n+1 multiplier (K = n+3: 7, 11, 19 at n = 4, 8, 16). For random operands the two
// outputs must satisfy sum(ops) = s + c + (K-2) 2^n (mod 2^n + 1): one 2^n per cell.
// The depth must be 4, 5 and 6 carry-save levels, the Wallace depths of 7, 11 and 19
// operands.
module tb_ceac_moma;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0][3:0]   o4;
  logic [10:0][7:0]  o8;
  logic [18:0][15:0] o16;
  logic [3:0]  s4, c4;
  logic [7:0]  s8, c8;
  logic [15:0] s16, c16;

  ceac_moma #(.N(4),  .K(7))  u4  (.ops(o4),  .s(s4),  .c(c4));
  ceac_moma #(.N(8),  .K(11)) u8  (.ops(o8),  .s(s8),  .c(c8));
  ceac_moma #(.N(16), .K(19)) u16 (.ops(o16), .s(s16), .c(c16));

  task automatic chk(input int n, input int k, input longint unsigned sum_ops,
                     input longint unsigned s, input longint unsigned c);
    longint unsigned m;
    m = (64'd1 << n) + 1;
    checks++;
    if (sum_ops % m != (s + c + longint'(k - 2) * (64'd1 << n)) % m) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d sum=%0d s=%0d c=%0d", n, sum_ops, s, c);
    end
  endtask

  task automatic chk_levels(input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL levels %0d expected %0d", got, exp_v);
    end
  endtask

  initial begin
    longint unsigned t4, t8, t16;
    chk_levels(u4.LEVELS, 4);
    chk_levels(u8.LEVELS, 5);
    chk_levels(u16.LEVELS, 6);
    for (int t = 0; t < 5000; t++) begin
      t4 = 0; t8 = 0; t16 = 0;
      for (int i = 0; i < 7; i++)  begin o4[i]  = 4'($urandom);  t4  += 64'(o4[i]);  end
      for (int i = 0; i < 11; i++) begin o8[i]  = 8'($urandom);  t8  += 64'(o8[i]);  end
      for (int i = 0; i < 19; i++) begin o16[i] = 16'($urandom); t16 += 64'(o16[i]); end
      #1;
      chk(4, 7, t4, 64'(s4), 64'(c4));
      chk(8, 11, t8, 64'(s8), 64'(c8));
      chk(16, 19, t16, 64'(s16), 64'(c16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
