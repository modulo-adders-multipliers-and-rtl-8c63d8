// tb_ppg_mod2nm1: the rows of the modulo 2^n-1 partial product generator add up to
// x y modulo 2^n - 1 (exhaustive at n = 4, random at n = 16), and at n = 4 every bit
// equals x_((k-j) mod n) y_j as worked out from the periodicity 2^(n+m) = 2^m.
module tb_ppg_mod2nm1;
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

  logic [3:0]        x4, y4;
  logic [3:0][3:0]   pp4;
  logic [15:0]       x16, y16;
  logic [15:0][15:0] pp16;

  ppg_mod2nm1 #(.N(4)) u4  (.x(x4), .y(y4), .pp(pp4));
  ppg_mod2nm1          u16 (.x(x16), .y(y16), .pp(pp16));

  initial begin
    longint unsigned sum;
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        sum = 0;
        for (int j = 0; j < 4; j++) sum += 64'(pp4[j]);
        chk("n4 sum", sum % 15, (64'(a) * 64'(b)) % 15);
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 4; k++)
            chk("n4 bit", 64'(pp4[j][k]), 64'(x4[(k - j + 4) % 4] & y4[j]));
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      #1;
      sum = 0;
      for (int j = 0; j < 16; j++) sum += 64'(pp16[j]);
      chk("n16 sum", sum % 65535, (64'(x16) * 64'(y16)) % 65535);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
