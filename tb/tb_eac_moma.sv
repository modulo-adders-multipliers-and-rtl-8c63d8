// tb_eac_moma: the modulo 2^n-1 Wallace tree: sum(ops) = s + c (mod 2^n - 1) for
// random operands at n = 16 with 16 operands (the multiplier's size) and at n = 5 with
// 7 operands, and the tree depths (6 levels for 16 operands, 4 for 7).
module tb_eac_moma;
  import rns_pkg::*;
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

  logic [15:0][15:0] ops16;
  logic [15:0]       s16, c16;
  logic [6:0][4:0]   ops5;
  logic [4:0]        s5, c5;

  eac_moma                    u16 (.ops(ops16), .s(s16), .c(c16));
  eac_moma #(.N(5), .K(7))    u5  (.ops(ops5), .s(s5), .c(c5));

  initial begin
    longint unsigned sum;
    chk("levels 16", 64'(u16.LEVELS), 6);
    chk("levels 7", 64'(u5.LEVELS), 4);
    for (int t = 0; t < 20000; t++) begin
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        ops16[i] = (t % 7 == 0) ? 16'hFFFF : 16'($urandom);
        sum += 64'(ops16[i]);
      end
      for (int i = 0; i < 7; i++) ops5[i] = 5'($urandom);
      #1;
      chk("n16", (64'(s16) + 64'(c16)) % 65535, sum % 65535);
      sum = 0;
      for (int i = 0; i < 7; i++) sum += 64'(ops5[i]);
      chk("n5", (64'(s5) + 64'(c5)) % 31, sum % 31);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
