// tb_eac_prefix_adder: the modulo 2^n-1 adder against (x + y) mod (2^n - 1), zero only
// as all zeros: exhaustive at n = 8 for the three prefix networks (the all-ones
// operand included), random with boundary sums at n = 16. Counts re-entered carries
// and replaced all-ones results.
module tb_eac_prefix_adder;
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

  int n_eac = 0, n_dual = 0;
  logic [7:0]  x8, y8, zs, zb, zk;
  logic [15:0] x16, y16, z16;

  eac_prefix_adder #(.N(8), .TREE(SKLANSKY))    us (.x(x8), .y(y8), .z(zs));
  eac_prefix_adder #(.N(8), .TREE(BRENT_KUNG))  ub (.x(x8), .y(y8), .z(zb));
  eac_prefix_adder #(.N(8), .TREE(KOGGE_STONE)) uk (.x(x8), .y(y8), .z(zk));
  eac_prefix_adder                              u16 (.x(x16), .y(y16), .z(z16));

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b);
        #1;
        chk("n8 skl", 64'(zs), 64'((a + b) % 255));
        chk("n8 bk",  64'(zb), 64'((a + b) % 255));
        chk("n8 ks",  64'(zk), 64'((a + b) % 255));
        if (us.cin) n_eac++;
        if (us.all_p || us.all_g) n_dual++;
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom);
      y16 = (t % 4 == 0) ? ~x16 : 16'($urandom);
      #1;
      chk("n16", 64'(z16), (64'(x16) + 64'(y16)) % 65535);
    end
    checks += 2;
    if (n_eac == 0) failures++;
    if (n_dual == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
