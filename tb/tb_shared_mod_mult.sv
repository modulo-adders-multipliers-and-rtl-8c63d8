// tb_shared_mod_mult: the shared-moduli multiplier in each mode against integer
// arithmetic: (a b) mod (2^n - 1), mod 2^n, mod (2^n + 1). Every operand pair below the
// modulus (0..2^n for 2^n+1, 0..2^n-1 for 2^n, 0..2^n-2 for 2^n-1) at n = 4 and 8,
// random pairs at n = 16 with each prefix network.
module tb_shared_mod_mult;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t sel;
  logic [4:0]  a4, b4, z4;
  logic [8:0]  a8, b8, z8;
  logic [16:0] a16, b16, z16s, z16b, z16k;

  shared_mod_mult #(.N(4))  u4  (.sel(sel), .a(a4), .b(b4), .z(z4));
  shared_mod_mult #(.N(8))  u8  (.sel(sel), .a(a8), .b(b8), .z(z8));
  shared_mod_mult #(.N(16), .TREE(SKLANSKY))    u16s (.sel(sel), .a(a16), .b(b16), .z(z16s));
  shared_mod_mult #(.N(16), .TREE(BRENT_KUNG))  u16b (.sel(sel), .a(a16), .b(b16), .z(z16b));
  shared_mod_mult #(.N(16), .TREE(KOGGE_STONE)) u16k (.sel(sel), .a(a16), .b(b16), .z(z16k));

  function automatic longint unsigned modulus(input int n);
    case (sel)
      MOD_2N_M1: return (64'd1 << n) - 1;
      MOD_2N:    return (64'd1 << n);
      default:   return (64'd1 << n) + 1;
    endcase
  endfunction

  task automatic chk(input string nm, input int n, input longint unsigned got,
                     input longint unsigned a, input longint unsigned b);
    longint unsigned e;
    e = (a * b) % modulus(n);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%s %0d*%0d got %0d exp %0d", nm, sel.name(), a, b, got, e);
    end
  endtask

  initial begin
    longint unsigned m4, m8, m16;
    for (int m = 0; m < 3; m++) begin
      sel = modsel_t'(m);
      m4 = modulus(4); m8 = modulus(8); m16 = modulus(16);
      for (int a = 0; a < int'(m8); a++) begin
        for (int b = 0; b < int'(m8); b++) begin
          a8 = 9'(a); b8 = 9'(b);
          a4 = 5'(a % int'(m4)); b4 = 5'(b % int'(m4));
          #1;
          chk("n8", 8, 64'(z8), 64'(a), 64'(b));
          chk("n4", 4, 64'(z4), 64'(a4), 64'(b4));
        end
      end
      for (int t = 0; t < 10000; t++) begin
        a16 = (t % 7 == 0) ? 17'(m16 - 1) : 17'(longint'($urandom) % m16);
        b16 = (t % 5 == 0) ? 17'(m16 - 1) : 17'(longint'($urandom) % m16);
        #1;
        chk("n16 skl", 16, 64'(z16s), 64'(a16), 64'(b16));
        chk("n16 bk",  16, 64'(z16b), 64'(a16), 64'(b16));
        chk("n16 ks",  16, 64'(z16k), 64'(a16), 64'(b16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
