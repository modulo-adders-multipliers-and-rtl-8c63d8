// tb_ppg_mod2np1: the n+3 rows of the modulo 2^n+1 partial product generator.
//  * Sum check, for every operand pair of 0..2^n at n = 4 and 8 and random pairs at
//    n = 16: sum(rows) + 2^n (2^n - 1 - n) = x y (mod 2^n + 1), the constant being the
//    weight the complemented wrapped bits leave out.
//  * Bit check at n = 4 against the written-out rows: PP_1 bit 0 = ~(x3 y1),
//    PP_2 bits 1,0 = ~(x3 y2), ~(x2 y2), PP_3 bits 2..0 = ~(x3 y3), ~(x2 y3), ~(x1 y3),
//    PP_3 bit 3 = x0 y3, row s.!q bit k = (x4 ^ y4) & ~(xk | yk), 2s = (x4 ^ y4) at bit 1.
module tb_ppg_mod2np1;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0]  x4, y4;
  logic [8:0]  x8, y8;
  logic [16:0] x16, y16;
  logic [6:0][3:0]   pp4;
  logic [10:0][7:0]  pp8;
  logic [18:0][15:0] pp16;

  ppg_mod2np1 #(.N(4))  u4  (.x(x4),  .y(y4),  .pp(pp4));
  ppg_mod2np1 #(.N(8))  u8  (.x(x8),  .y(y8),  .pp(pp8));
  ppg_mod2np1 #(.N(16)) u16 (.x(x16), .y(y16), .pp(pp16));

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x4=%0d y4=%0d x8=%0d y8=%0d", nm, x4, y4, x8, y8);
    end
  endtask

  function automatic logic sum_ok(input int n, input longint unsigned rows,
                                  input longint unsigned x, input longint unsigned y);
    longint unsigned m, k;
    m = (64'd1 << n) + 1;
    k = (64'd1 << n) * ((64'd1 << n) - 1 - longint'(n));
    return (rows + k) % m == (x * y) % m;
  endfunction

  initial begin
    longint unsigned r;
    logic s;
    for (int a = 0; a <= 256; a++) begin
      for (int b = 0; b <= 256; b++) begin
        x8 = 9'(a); y8 = 9'(b);
        x4 = 5'(a % 17); y4 = 5'(b % 17);
        x16 = 17'($urandom % 65538); y16 = 17'($urandom % 65538);
        #1;
        r = 0; for (int i = 0; i < 11; i++) r += 64'(pp8[i]);
        chk("sum n8", sum_ok(8, r, 64'(x8), 64'(y8)));
        r = 0; for (int i = 0; i < 19; i++) r += 64'(pp16[i]);
        chk("sum n16", sum_ok(16, r, 64'(x16), 64'(y16)));
        if (a < 17 && b < 17) begin
          r = 0; for (int i = 0; i < 7; i++) r += 64'(pp4[i]);
          chk("sum n4", sum_ok(4, r, 64'(x4), 64'(y4)));
          s = x4[4] ^ y4[4];
          chk("PP1[0]", pp4[1][0] == ~(x4[3] & y4[1]));
          chk("PP2[1:0]", pp4[2][1:0] == {~(x4[3] & y4[2]), ~(x4[2] & y4[2])});
          chk("PP3", pp4[3] == {x4[0] & y4[3], ~(x4[3] & y4[3]), ~(x4[2] & y4[3]), ~(x4[1] & y4[3])});
          chk("PP0", pp4[0] == (x4[3:0] & {4{y4[0]}}));
          chk("sq", pp4[4] == ({4{s}} & ~(x4[3:0] | y4[3:0])));
          chk("anbn", pp4[5] == {3'b000, x4[4] & y4[4]});
          chk("2s", pp4[6] == {2'b00, s, 1'b0});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
