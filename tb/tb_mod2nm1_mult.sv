// tb_mod2nm1_mult: the multiplier against |x y| mod (2^n - 1), zero only as all zeros; the all-ones operand (the second form of zero) is included. Exhaustive at n = 4 and n = 8, random with corner
// operands at n = 16 (Sklansky and Kogge-Stone adders) and n = 32.
module tb_mod2nm1_mult;
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

  logic [3:0]  x4, y4, z4;
  logic [7:0]  x8, y8, z8;
  logic [15:0] x16, y16, z16s, z16k;
  logic [31:0] x32, y32, z32;

  mod2nm1_mult #(.N(4))                       u4   (.x(x4), .y(y4), .z(z4));
  mod2nm1_mult #(.N(8))                       u8   (.x(x8), .y(y8), .z(z8));
  mod2nm1_mult                                u16s (.x(x16), .y(y16), .z(z16s));
  mod2nm1_mult #(.N(16), .TREE(KOGGE_STONE))  u16k (.x(x16), .y(y16), .z(z16k));
  mod2nm1_mult #(.N(32))                      u32  (.x(x32), .y(y32), .z(z32));

  function automatic longint unsigned modulus(input int n);
    return ((64'd1 << n) - 1);
  endfunction

  function automatic longint unsigned mulmod(input longint unsigned a, input longint unsigned b,
                                             input int n);
    // a, b < 2^32: the 64-bit product cannot overflow
    return (a * b) % modulus(n);
  endfunction

  function automatic logic [31:0] corner(input int t);
    case (t % 6)
      0: return '0;
      1: return 32'd1;
      2: return '1;
      3: return 32'hFFFF_FFFE;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b); x4 = 4'(a); y4 = 4'(b);
        #1;
        chk("n8", 64'(z8), mulmod(64'(a), 64'(b), 8));
        if (a < 16 && b < 16) chk("n4", 64'(z4), mulmod(64'(a), 64'(b), 4));
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x32 = corner(t); y32 = corner(t / 6 + 7 * t);
      x16 = x32[15:0]; y16 = y32[15:0];
      #1;
      chk("n16 skl", 64'(z16s), mulmod(64'(x16), 64'(y16), 16));
      chk("n16 ks",  64'(z16k), mulmod(64'(x16), 64'(y16), 16));
      chk("n32",     64'(z32),  mulmod(64'(x32), 64'(y32), 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
