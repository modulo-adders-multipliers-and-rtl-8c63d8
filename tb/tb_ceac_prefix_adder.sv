// tb_ceac_prefix_adder: the modulo 2^n+1 CEAC adder must return (x + y + 1) mod (2^n+1)
// as an (n+1)-bit number. Exhaustive at n = 8 with each prefix network; random plus the
// boundary sums (x + y = 2^n - 1 gives 2^n, x + y = 2^n gives 0) at n = 16.
module tb_ceac_prefix_adder;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int n_top = 0;   // results equal to 2^n (MSB from the propagate signals)

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  x8, y8;
  logic [8:0]  z8s, z8b, z8k;
  logic [15:0] x16, y16;
  logic [16:0] z16;

  ceac_prefix_adder #(.N(8), .TREE(SKLANSKY))    u8s (.x(x8), .y(y8), .z(z8s));
  ceac_prefix_adder #(.N(8), .TREE(BRENT_KUNG))  u8b (.x(x8), .y(y8), .z(z8b));
  ceac_prefix_adder #(.N(8), .TREE(KOGGE_STONE)) u8k (.x(x8), .y(y8), .z(z8k));
  ceac_prefix_adder #(.N(16))                    u16 (.x(x16), .y(y16), .z(z16));

  task automatic chk(input string nm, input longint unsigned got, input longint unsigned exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", nm, got, exp_v);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        chk("n8 skl", 64'(z8s), 64'((a + b + 1) % 257));
        chk("n8 bk",  64'(z8b), 64'((a + b + 1) % 257));
        chk("n8 ks",  64'(z8k), 64'((a + b + 1) % 257));
        if (z8s == 9'd256) n_top++;
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom);
      case (t % 4)
        0: y16 = 16'hFFFF - x16;          // sum 2^n - 1 -> 2^n
        1: y16 = 16'(17'h10000 - x16);    // sum 2^n     -> 0
        default: y16 = 16'($urandom);
      endcase
      #1;
      chk("n16", 64'(z16), (64'(x16) + 64'(y16) + 1) % 65537);
      if (z16 == 17'h10000) n_top++;
    end
    checks++;
    if (n_top == 0) begin
      failures++;
      $display("FAIL the result 2^n never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
