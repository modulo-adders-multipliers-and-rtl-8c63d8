// tb_mod2np1_mult: the modulo 2^n+1 multiplier against (x y) mod (2^n + 1).
// Every operand pair of 0..2^n at n = 4 and n = 8 (Sklansky and Kogge-Stone final
// adders), random pairs with the corner operands 0, 1, 2^n - 1 and 2^n at n = 16.
module tb_mod2np1_mult;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int n_top = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0]  x4, y4, z4;
  logic [8:0]  x8, y8, z8, z8k;
  logic [16:0] x16, y16, z16;

  mod2np1_mult #(.N(4))                      u4  (.x(x4),  .y(y4),  .z(z4));
  mod2np1_mult #(.N(8))                      u8  (.x(x8),  .y(y8),  .z(z8));
  mod2np1_mult #(.N(8), .TREE(KOGGE_STONE))  u8k (.x(x8),  .y(y8),  .z(z8k));
  mod2np1_mult #(.N(16))                     u16 (.x(x16), .y(y16), .z(z16));

  task automatic chk(input string nm, input longint unsigned got, input longint unsigned exp_v,
                     input longint unsigned a, input longint unsigned b);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d*%0d got %0d exp %0d", nm, a, b, got, exp_v);
    end
  endtask

  function automatic logic [16:0] pick16(input int t);
    case (t % 6)
      0: return 17'd0;
      1: return 17'd1;
      2: return 17'h0FFFF;
      3: return 17'h10000;
      default: return 17'($urandom % 65537);
    endcase
  endfunction

  initial begin
    for (int a = 0; a <= 256; a++) begin
      for (int b = 0; b <= 256; b++) begin
        x8 = 9'(a); y8 = 9'(b);
        x4 = 5'(a % 17); y4 = 5'(b % 17);
        #1;
        chk("n8", 64'(z8), 64'((a * b) % 257), 64'(a), 64'(b));
        chk("n8 ks", 64'(z8k), 64'((a * b) % 257), 64'(a), 64'(b));
        if (a < 17 && b < 17) chk("n4", 64'(z4), 64'((a * b) % 17), 64'(a), 64'(b));
        if (z8 == 9'd256) n_top++;
      end
    end
    for (int t = 0; t < 30000; t++) begin
      x16 = pick16(t);
      y16 = pick16(t / 6 + 3 * t);
      #1;
      chk("n16", 64'(z16), (64'(x16) * 64'(y16)) % 65537, 64'(x16), 64'(y16));
    end
    checks++;
    if (n_top == 0) begin
      failures++;
      $display("FAIL product 2^n never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
