// tb_shared_mod_adder: the shared adder in its three modes against integer arithmetic:
//   2^n-1: (x + y) mod (2^n - 1), zero always all-zero (x, y in 0..2^n-2, plus the
//          all-ones zero as an input);
//   2^n  : (x + y) mod 2^n;
//   2^n+1: (x + y + 1) mod (2^n + 1), the diminished-one sum, n+1-bit result.
// Exhaustive at n = 6 for every prefix network, random with boundary sums at n = 16.
module tb_shared_mod_adder;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int n_dual = 0, n_top = 0, n_eac = 0, n_ceac = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t     sel;
  logic [5:0]  x6, y6;
  logic [6:0]  z6s, z6b, z6k;
  logic [15:0] x16, y16;
  logic [16:0] z16;

  shared_mod_adder #(.N(6), .TREE(SKLANSKY))    u6s (.sel(sel), .x(x6), .y(y6), .z(z6s));
  shared_mod_adder #(.N(6), .TREE(BRENT_KUNG))  u6b (.sel(sel), .x(x6), .y(y6), .z(z6b));
  shared_mod_adder #(.N(6), .TREE(KOGGE_STONE)) u6k (.sel(sel), .x(x6), .y(y6), .z(z6k));
  shared_mod_adder #(.N(16))                    u16 (.sel(sel), .x(x16), .y(y16), .z(z16));

  function automatic longint unsigned ref_add(input modsel_t m, input int n,
                                              input longint unsigned a, input longint unsigned b);
    longint unsigned two_n;
    two_n = 64'd1 << n;
    case (m)
      MOD_2N_M1: return (a + b) % (two_n - 1);
      MOD_2N:    return (a + b) % two_n;
      default:   return (a + b + 1) % (two_n + 1);
    endcase
  endfunction

  task automatic chk(input string nm, input longint unsigned got, input longint unsigned exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%s got %0d exp %0d", nm, sel.name(), got, exp_v);
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      sel = modsel_t'(m);
      for (int a = 0; a < 64; a++) begin
        for (int b = 0; b < 64; b++) begin
          x6 = 6'(a); y6 = 6'(b);
          #1;
          chk("n6 skl", 64'(z6s), ref_add(sel, 6, 64'(a), 64'(b)));
          chk("n6 bk",  64'(z6b), ref_add(sel, 6, 64'(a), 64'(b)));
          chk("n6 ks",  64'(z6k), ref_add(sel, 6, 64'(a), 64'(b)));
          if (sel == MOD_2N_M1 && a + b == 63) n_dual++;
          if (sel == MOD_2N_P1 && z6s == 7'd64) n_top++;
          if (sel == MOD_2N_M1 && a + b > 63) n_eac++;
          if (sel == MOD_2N_P1 && a + b < 64) n_ceac++;
        end
      end
      for (int t = 0; t < 5000; t++) begin
        x16 = 16'($urandom);
        y16 = (t % 3 == 0) ? 16'hFFFF - x16 : 16'($urandom);
        #1;
        chk("n16", 64'(z16), ref_add(sel, 16, 64'(x16), 64'(y16)));
      end
    end
    checks++;
    if (n_dual == 0 || n_top == 0 || n_eac == 0 || n_ceac == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred: dual=%0d top=%0d eac=%0d ceac=%0d",
               n_dual, n_top, n_eac, n_ceac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
