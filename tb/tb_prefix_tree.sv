// tb_prefix_tree: checks every prefix network (Sklansky, Brent-Kung, Kogge-Stone) at
// 16 bits and at the odd widths 5 and 7. The reference is arithmetic: G[i:0] must be the
// carry out of bit i of x + y (carry in 0), and P[i:0] must say that x[i:0] + y[i:0] is
// all ones, i.e. that a carry into bit 0 would ripple out of bit i.
module tb_prefix_tree;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] x16, y16;
  logic [6:0]  x7, y7;
  logic [4:0]  x5, y5;
  logic [15:0] p16, g16, gp_s, gg_s, gp_b, gg_b, gp_k, gg_k;
  logic [6:0]  gp7b, gg7b, gp7s, gg7s;
  logic [4:0]  gp5k, gg5k, gp5b, gg5b;

  assign p16 = x16 ^ y16;
  assign g16 = x16 & y16;

  prefix_tree #(.N(16), .TREE(SKLANSKY))    u_s (.p(p16), .g(g16), .pg_p(gp_s), .pg_g(gg_s));
  prefix_tree #(.N(16), .TREE(BRENT_KUNG))  u_b (.p(p16), .g(g16), .pg_p(gp_b), .pg_g(gg_b));
  prefix_tree #(.N(16), .TREE(KOGGE_STONE)) u_k (.p(p16), .g(g16), .pg_p(gp_k), .pg_g(gg_k));
  prefix_tree #(.N(7), .TREE(BRENT_KUNG))   u_7b (.p(x7 ^ y7), .g(x7 & y7), .pg_p(gp7b), .pg_g(gg7b));
  prefix_tree #(.N(7), .TREE(SKLANSKY))     u_7s (.p(x7 ^ y7), .g(x7 & y7), .pg_p(gp7s), .pg_g(gg7s));
  prefix_tree #(.N(5), .TREE(KOGGE_STONE))  u_5k (.p(x5 ^ y5), .g(x5 & y5), .pg_p(gp5k), .pg_g(gg5k));
  prefix_tree #(.N(5), .TREE(BRENT_KUNG))   u_5b (.p(x5 ^ y5), .g(x5 & y5), .pg_p(gp5b), .pg_g(gg5b));

  // reference carry out of bit i and group propagate
  function automatic logic ref_g(input longint unsigned x, input longint unsigned y, input int i);
    longint unsigned m;
    m = (64'd1 << (i + 1)) - 1;
    return (((x & m) + (y & m)) >> (i + 1)) != 0;
  endfunction
  function automatic logic ref_p(input longint unsigned x, input longint unsigned y, input int i);
    longint unsigned m;
    m = (64'd1 << (i + 1)) - 1;
    return ((x ^ y) & m) == m;
  endfunction

  task automatic cmp(input string nm, input int w, input longint unsigned x,
                     input longint unsigned y, input longint unsigned gp,
                     input longint unsigned gg);
    for (int i = 0; i < w; i++) begin
      checks++;
      if (gg[i] !== ref_g(x, y, i) || gp[i] !== ref_p(x, y, i)) begin
        failures++;
        if (failures < 10) $display("FAIL %s bit %0d x=%h y=%h", nm, i, x, y);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      x16 = 16'($urandom);
      y16 = (t % 3 == 0) ? ~x16 ^ 16'(1 << (t % 16)) : 16'($urandom);  // long propagate runs
      x7 = 7'(t % 128);
      y7 = 7'(t / 128 + t * 37);
      x5 = 5'(t % 32);
      y5 = 5'(t / 32);
      #1;
      cmp("skl16", 16, 64'(x16), 64'(y16), 64'(gp_s), 64'(gg_s));
      cmp("bk16",  16, 64'(x16), 64'(y16), 64'(gp_b), 64'(gg_b));
      cmp("ks16",  16, 64'(x16), 64'(y16), 64'(gp_k), 64'(gg_k));
      cmp("bk7",   7,  64'(x7),  64'(y7),  64'(gp7b), 64'(gg7b));
      cmp("skl7",  7,  64'(x7),  64'(y7),  64'(gp7s), 64'(gg7s));
      cmp("ks5",   5,  64'(x5),  64'(y5),  64'(gp5k), 64'(gg5k));
      cmp("bk5",   5,  64'(x5),  64'(y5),  64'(gp5b), 64'(gg5b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
