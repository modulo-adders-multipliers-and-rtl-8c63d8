// wl_runner: drives one instance of the top at width N with prefix network TREE through
// VECTORS random operand pairs per modulus (plus the corner operands 0, 1, m-2, m-1) and
// compares the two n+1-bit multipliers with (a b) mod m computed on 132-bit integers; the
// look-ahead shared adder gets random and boundary operands in the same moduli and is
// compared with (x + y) mod m, or (x + y + 1) mod (2^n + 1); the single-modulus 2^n-1
// and 2^n multipliers are compared with (x y) mod m. Results are
// left in checks/failures and done is raised at the end. Used by tb_workloads.
module wl_runner
  import rns_pkg::*;
#(
  parameter int           N       = 8,
  parameter prefix_tree_t TREE    = SKLANSKY,
  parameter int           VECTORS = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  modsel_t    sm_sel;
  logic [N:0] sm_a, sm_b, sm_z, fm_x, fm_y, fm_z;
  modsel_t      sa_sel;
  logic [N-1:0] sa_x, sa_y;
  logic [N:0]   sa_z;
  logic [N-1:0] em_x, em_y, em_z, bm_x, bm_y, bm_z;

  rns_modarith_top #(.N(N), .TREE(TREE)) dut (.*);

  typedef logic [131:0] wide_t;

  function automatic wide_t modulus(input modsel_t m);
    case (m)
      MOD_2N_M1: return (wide_t'(1) << N) - 1;
      MOD_2N:    return (wide_t'(1) << N);
      default:   return (wide_t'(1) << N) + 1;
    endcase
  endfunction

  function automatic logic [N:0] operand(input wide_t m, input int t);
    wide_t r;
    case (t % 8)
      0: return '0;
      1: return (N+1)'(1);
      2: return (N+1)'(m - 1);
      3: return (N+1)'(m - 2);
      default: begin
        r = {$urandom, $urandom, $urandom};
        return (N+1)'(r % m);
      end
    endcase
  endfunction

  initial begin
    wide_t m, mf, e;
    checks = 0;
    failures = 0;
    done = 1'b0;
    mf = modulus(MOD_2N_P1);
    for (int t = 0; t < 3 * VECTORS; t++) begin
      sm_sel = modsel_t'(t % 3);
      m = modulus(sm_sel);
      sm_a = operand(m, t / 3);
      sm_b = operand(m, t / 24 + 5 * t);
      fm_x = operand(mf, t);
      fm_y = operand(mf, t / 8 + 3 * t);
      sa_sel = modsel_t'((t / 3) % 3);
      sa_x   = N'({$urandom, $urandom});
      case (t % 4)
        0:       sa_y = ~sa_x;
        1:       sa_y = ~sa_x + N'(1);
        default: sa_y = N'({$urandom, $urandom});
      endcase
      em_x = N'(operand(modulus(MOD_2N_M1), t));
      em_y = N'(operand(modulus(MOD_2N_M1), t / 8 + 7 * t));
      bm_x = N'({$urandom, $urandom});
      bm_y = N'({$urandom, $urandom});
      #1;
      e = (wide_t'(em_x) * wide_t'(em_y)) % modulus(MOD_2N_M1);
      checks++;
      if (wide_t'(em_z) != e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d mersenne %0d*%0d got %0d exp %0d", N, em_x, em_y, em_z, e);
      end
      e = (wide_t'(bm_x) * wide_t'(bm_y)) % modulus(MOD_2N);
      checks++;
      if (wide_t'(bm_z) != e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d binary %0d*%0d got %0d exp %0d", N, bm_x, bm_y, bm_z, e);
      end
      e = (wide_t'(sa_x) + wide_t'(sa_y) + (sa_sel == MOD_2N_P1 ? 1 : 0)) % modulus(sa_sel);
      checks++;
      if (wide_t'(sa_z) != e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d adder %0d+%0d got %0d exp %0d",
                                   N, sa_x, sa_y, sa_z, e);
      end
      e = (wide_t'(sm_a) * wide_t'(sm_b)) % m;
      checks++;
      if (wide_t'(sm_z) != e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d %s shared %0d*%0d got %0d exp %0d",
                                   N, TREE.name(), sm_a, sm_b, sm_z, e);
      end
      e = (wide_t'(fm_x) * wide_t'(fm_y)) % mf;
      checks++;
      if (wide_t'(fm_z) != e) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d %s fermat %0d*%0d got %0d exp %0d",
                                   N, TREE.name(), fm_x, fm_y, fm_z, e);
      end
    end
    done = 1'b1;
  end
endmodule
