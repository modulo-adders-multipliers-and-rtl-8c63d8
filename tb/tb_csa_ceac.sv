// tb_csa_ceac: the CSA with complemented end-around carry must satisfy
// a + b + d = s + cc + 2^n (mod 2^n + 1) for any three n-bit words (exhaustive at n = 4,
// random at n = 16).
module tb_csa_ceac;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]  a4, b4, d4, s4, c4;
  logic [15:0] a16, b16, d16, s16, c16;

  csa_ceac #(.N(4))  u4  (.a(a4), .b(b4), .d(d4), .s(s4), .cc(c4));
  csa_ceac #(.N(16)) u16 (.a(a16), .b(b16), .d(d16), .s(s16), .cc(c16));

  task automatic chk(input int n, input longint unsigned lhs, input longint unsigned rhs);
    longint unsigned m;
    m = (64'd1 << n) + 1;
    checks++;
    if (lhs % m != rhs % m) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d lhs=%0d rhs=%0d", n, lhs, rhs);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a4, b4, d4} = 12'(v);
      a16 = 16'($urandom); b16 = 16'($urandom); d16 = 16'($urandom);
      #1;
      chk(4, 64'(a4) + 64'(b4) + 64'(d4), 64'(s4) + 64'(c4) + 16);
      chk(16, 64'(a16) + 64'(b16) + 64'(d16), 64'(s16) + 64'(c16) + 65536);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
