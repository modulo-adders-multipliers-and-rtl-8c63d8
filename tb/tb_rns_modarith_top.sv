// tb_rns_modarith_top: end-to-end test of the top at its default size (n = 16,
// Sklansky adders). Both multipliers get random and corner operands; each product is
// compared with (a b) mod m computed in integer arithmetic. Counts how often each
// mechanism of the design was exercised and fails if one never was:
//   modulus 2^n-1, 2^n and 2^n+1 selected on the shared unit; end-around carry of 1
//   re-entered (2^n-1); complemented carry of 1 re-entered (2^n+1, both units); the
//   all-ones zero replaced by zero; the result 2^n produced (both units); an operand
//   equal to 2^n (cross-term row s.!q active); both operands 2^n (a_n b_n term).
// The look-ahead shared adder gets random and boundary sums in all three moduli and is
// compared with (x + y) mod m, or (x + y + 1) mod (2^n + 1) for the diminished-one sum;
// its end-around carry, complemented carry, zero correction and 2^n result are counted.
// The single-modulus 2^n-1 and 2^n multipliers are compared with (x y) mod m; for the
// first, re-entered end-around carries and replaced all-ones results are counted.
module tb_rns_modarith_top;
  import rns_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  int n_mode [3];
  int n_eac = 0, n_ceac_sm = 0, n_ceac_fm = 0, n_dual = 0, n_top_sm = 0, n_top_fm = 0;
  int n_s = 0, n_anbn = 0;
  int n_sa_mode [3];
  int n_sa_eac = 0, n_sa_ceac = 0, n_sa_dual = 0, n_sa_top = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t    sm_sel;
  logic [N:0] sm_a, sm_b, sm_z, fm_x, fm_y, fm_z;
  modsel_t      sa_sel;
  logic [N-1:0] sa_x, sa_y;
  logic [N:0]   sa_z;
  logic [N-1:0] em_x, em_y, em_z, bm_x, bm_y, bm_z;
  int n_em_eac = 0, n_em_dual = 0;

  rns_modarith_top dut (.*);

  function automatic longint unsigned modulus(input modsel_t m);
    case (m)
      MOD_2N_M1: return (64'd1 << N) - 1;
      MOD_2N:    return (64'd1 << N);
      default:   return (64'd1 << N) + 1;
    endcase
  endfunction

  function automatic logic [N:0] operand(input longint unsigned m, input int t);
    case (t % 9)
      0: return '0;
      1: return (N+1)'(1);
      2: return (N+1)'(m - 1);
      3: return (N+1)'(m - 2);
      default: return (N+1)'(longint'($urandom) % m);
    endcase
  endfunction

  task automatic chk(input string nm, input longint unsigned got, input longint unsigned e,
                     input longint unsigned a, input longint unsigned b);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d*%0d got %0d exp %0d", nm, a, b, got, e);
    end
  endtask

  task automatic count(input string nm, input int v);
    checks++;
    $display("  %-34s %0d", nm, v);
    if (v == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", nm);
    end
  endtask

  initial begin
    longint unsigned m, mf;
    mf = modulus(MOD_2N_P1);
    for (int t = 0; t < 60000; t++) begin
      sm_sel = modsel_t'(t % 3);
      m = modulus(sm_sel);
      sm_a = operand(m, t / 3);
      sm_b = operand(m, t / 27 + 5 * t);
      // a product that is a non-trivial multiple of 2^16 - 1 = 255 * 257: the final
      // adder then sees words adding up to the all-ones form of zero
      if (sm_sel == MOD_2N_M1 && t % 11 == 0) begin
        sm_a = (N+1)'(255 * (1 + (t / 33) % 200));
        sm_b = (N+1)'(257 * (1 + (t / 7) % 200));
      end
      fm_x = operand(mf, t);
      fm_y = operand(mf, t / 9 + 2 * t);
      sa_sel = modsel_t'((t / 3) % 3);
      sa_x   = N'($urandom);
      case (t % 5)
        0:       sa_y = ~sa_x;                  // sum 2^n - 1
        1:       sa_y = ~sa_x + N'(1);          // sum 2^n
        2:       begin sa_x = '1; sa_y = '1; end
        default: sa_y = N'($urandom);
      endcase
      em_x = N'(operand(modulus(MOD_2N_M1), t / 2));
      em_y = (t % 13 == 0) ? '1 : N'(operand(modulus(MOD_2N_M1), t / 18 + 3 * t));
      bm_x = N'($urandom);
      bm_y = (t % 7 == 0) ? N'(1) << (t % N) : N'($urandom);
      #1;
      chk("mersenne", 64'(em_z), (64'(em_x) * 64'(em_y)) % modulus(MOD_2N_M1), 64'(em_x), 64'(em_y));
      chk("binary", 64'(bm_z), (64'(bm_x) * 64'(bm_y)) % modulus(MOD_2N), 64'(bm_x), 64'(bm_y));
      if (dut.u_mersenne.u_add.cin) n_em_eac++;
      if (dut.u_mersenne.u_add.all_p || dut.u_mersenne.u_add.all_g) n_em_dual++;
      if (sa_sel == MOD_2N_P1)
        chk("adder", 64'(sa_z), (64'(sa_x) + 64'(sa_y) + 1) % modulus(sa_sel), 64'(sa_x), 64'(sa_y));
      else
        chk("adder", 64'(sa_z), (64'(sa_x) + 64'(sa_y)) % modulus(sa_sel), 64'(sa_x), 64'(sa_y));
      n_sa_mode[int'(sa_sel)]++;
      if (sa_sel == MOD_2N_M1 && dut.u_adder.cout) n_sa_eac++;
      if (sa_sel == MOD_2N_P1 && !dut.u_adder.cout) n_sa_ceac++;
      if (sa_sel == MOD_2N_M1 && (dut.u_adder.all_p || dut.u_adder.all_g)) n_sa_dual++;
      if (sa_sel == MOD_2N_P1 && sa_z[N]) n_sa_top++;
      chk("shared", 64'(sm_z), (64'(sm_a) * 64'(sm_b)) % m, 64'(sm_a), 64'(sm_b));
      chk("fermat", 64'(fm_z), (64'(fm_x) * 64'(fm_y)) % mf, 64'(fm_x), 64'(fm_y));
      n_mode[int'(sm_sel)]++;
      if (sm_sel == MOD_2N_M1 && dut.u_shared.u_add.cout) n_eac++;
      if (sm_sel == MOD_2N_P1 && !dut.u_shared.u_add.cout) n_ceac_sm++;
      if (dut.u_fermat.u_add.cin) n_ceac_fm++;
      if (sm_sel == MOD_2N_M1 && (dut.u_shared.u_add.all_p || dut.u_shared.u_add.all_g)) n_dual++;
      if (sm_sel == MOD_2N_P1 && sm_z[N]) n_top_sm++;
      if (fm_z[N]) n_top_fm++;
      if (sm_sel == MOD_2N_P1 && (sm_a[N] ^ sm_b[N])) n_s++;
      if (fm_x[N] && fm_y[N]) n_anbn++;
    end
    count("modulus 2^n-1 operations", n_mode[0]);
    count("modulus 2^n operations", n_mode[1]);
    count("modulus 2^n+1 operations", n_mode[2]);
    count("end-around carry re-entered", n_eac);
    count("complemented carry re-entered (sm)", n_ceac_sm);
    count("complemented carry re-entered (fm)", n_ceac_fm);
    count("all-ones zero replaced", n_dual);
    count("result 2^n (shared)", n_top_sm);
    count("result 2^n (fermat)", n_top_fm);
    count("operand 2^n, s.!q row active", n_s);
    count("both operands 2^n, a_n b_n", n_anbn);
    count("adder: modulus 2^n-1 operations", n_sa_mode[0]);
    count("adder: modulus 2^n operations", n_sa_mode[1]);
    count("adder: modulus 2^n+1 operations", n_sa_mode[2]);
    count("adder: end-around carry", n_sa_eac);
    count("adder: complemented carry", n_sa_ceac);
    count("adder: all-ones zero replaced", n_sa_dual);
    count("adder: result 2^n", n_sa_top);
    count("2^n-1 multiplier: end-around carry", n_em_eac);
    count("2^n-1 multiplier: all-ones zero replaced", n_em_dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
