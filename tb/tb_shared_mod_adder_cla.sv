// tb_shared_mod_adder_cla: the look-ahead version of the shared adder in its three
// modes against integer arithmetic:
//   2^n-1: (x + y) mod (2^n - 1), zero always all-zero;
//   2^n  : (x + y) mod 2^n;
//   2^n+1: (x + y + 1) mod (2^n + 1), the diminished-one sum, n+1-bit result.
// Exhaustive at n = 8 (two full groups) and n = 6 (a short last group), random with
// boundary sums at the default n = 16 and at n = 32. Counts the end-around carry, the
// complemented end-around carry, the all-ones zero and the 2^n result.
module tb_shared_mod_adder_cla;
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
  logic [7:0]  x8, y8;
  logic [8:0]  z8;
  logic [5:0]  x6, y6;
  logic [6:0]  z6;
  logic [15:0] x16, y16;
  logic [16:0] z16;
  logic [31:0] x32, y32;
  logic [32:0] z32;

  shared_mod_adder_cla #(.N(8))  u8  (.sel(sel), .x(x8), .y(y8), .z(z8));
  shared_mod_adder_cla #(.N(6))  u6  (.sel(sel), .x(x6), .y(y6), .z(z6));
  shared_mod_adder_cla           u16 (.sel(sel), .x(x16), .y(y16), .z(z16));
  shared_mod_adder_cla #(.N(32)) u32 (.sel(sel), .x(x32), .y(y32), .z(z32));

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
      for (int a = 0; a < 256; a++) begin
        for (int b = 0; b < 256; b++) begin
          x8 = 8'(a); y8 = 8'(b); x6 = 6'(a); y6 = 6'(b);
          #1;
          chk("n8", 64'(z8), ref_add(sel, 8, 64'(a), 64'(b)));
          if (a < 64 && b < 64) chk("n6", 64'(z6), ref_add(sel, 6, 64'(a), 64'(b)));
          if (sel == MOD_2N_M1 && a + b == 255) n_dual++;
          if (sel == MOD_2N_P1 && z8 == 9'd256) n_top++;
          if (sel == MOD_2N_M1 && a + b > 255) n_eac++;
          if (sel == MOD_2N_P1 && a + b < 256) n_ceac++;
        end
      end
      for (int t = 0; t < 5000; t++) begin
        x16 = 16'($urandom);
        y16 = (t % 3 == 0) ? 16'hFFFF - x16 : 16'($urandom);
        x32 = $urandom;
        y32 = (t % 3 == 1) ? 32'hFFFF_FFFF - x32 : $urandom;
        #1;
        chk("n16", 64'(z16), ref_add(sel, 16, 64'(x16), 64'(y16)));
        chk("n32", 64'(z32), ref_add(sel, 32, 64'(x32), 64'(y32)));
      end
    end
    checks++;
    if (n_dual == 0 || n_top == 0 || n_eac == 0 || n_ceac == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred: dual=%0d top=%0d eac=%0d ceac=%0d",
               n_dual, n_top, n_eac, n_ceac);
    end
    $display("mechanisms: dual=%0d top=%0d eac=%0d ceac=%0d", n_dual, n_top, n_eac, n_ceac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
