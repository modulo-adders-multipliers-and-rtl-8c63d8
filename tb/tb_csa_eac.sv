// tb_csa_eac: checks a + b + d = s + cc (mod 2^n - 1) for the end-around-carry
// carry-save cell: exhaustive at n = 4, random at n = 16. Counts the cases where the
// top carry is 1 and is re-entered at bit 0.
module tb_csa_eac;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string nm, input longint unsigned got, input longint unsigned e);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", nm, got, e);
    end
  endtask

  int n_wrap = 0;
  logic [3:0]  a4, b4, d4, s4, c4;
  logic [15:0] a16, b16, d16, s16, c16;

  csa_eac #(.N(4)) u4  (.a(a4), .b(b4), .d(d4), .s(s4), .cc(c4));
  csa_eac          u16 (.a(a16), .b(b16), .d(d16), .s(s16), .cc(c16));

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a4, b4, d4} = 12'(v);
      #1;
      chk("n4", (64'(s4) + 64'(c4)) % 15, (64'(a4) + 64'(b4) + 64'(d4)) % 15);
      if (c4[0]) n_wrap++;
    end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); d16 = 16'($urandom);
      #1;
      chk("n16", (64'(s16) + 64'(c16)) % 65535, (64'(a16) + 64'(b16) + 64'(d16)) % 65535);
    end
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
