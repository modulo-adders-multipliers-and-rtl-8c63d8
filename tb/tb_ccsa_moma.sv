// tb_ccsa_moma: the shared Wallace tree of composite CSAs in each mode, K = n+3 operands:
//   2^n-1: sum(ops) = s + c               (mod 2^n - 1)
//   2^n  : sum(ops) = s + c               (mod 2^n)
//   2^n+1: sum(ops) = s + c + (K-2) 2^n   (mod 2^n + 1)
// at n = 4 and n = 16, random operands, and the Wallace depths 4 and 6.
module tb_ccsa_moma;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t sel;
  logic [6:0][3:0]   o4;
  logic [18:0][15:0] o16;
  logic [3:0]  s4, c4;
  logic [15:0] s16, c16;

  ccsa_moma #(.N(4),  .K(7))  u4  (.sel(sel), .ops(o4),  .s(s4),  .c(c4));
  ccsa_moma #(.N(16), .K(19)) u16 (.sel(sel), .ops(o16), .s(s16), .c(c16));

  task automatic chk(input int n, input int k, input longint unsigned sum_ops,
                     input longint unsigned s, input longint unsigned c);
    longint unsigned m, rhs;
    case (sel)
      MOD_2N_M1: begin m = (64'd1 << n) - 1; rhs = s + c; end
      MOD_2N:    begin m = (64'd1 << n);     rhs = s + c; end
      default:   begin m = (64'd1 << n) + 1; rhs = s + c + longint'(k - 2) * (64'd1 << n); end
    endcase
    checks++;
    if (sum_ops % m != rhs % m) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%s n=%0d sum=%0d rhs=%0d", sel.name(), n, sum_ops, rhs);
    end
  endtask

  initial begin
    longint unsigned t4, t16;
    checks += 2;
    if (u4.LEVELS != 4 || u16.LEVELS != 6) begin
      failures++;
      $display("FAIL levels %0d %0d", u4.LEVELS, u16.LEVELS);
    end
    for (int m = 0; m < 3; m++) begin
      sel = modsel_t'(m);
      for (int t = 0; t < 4000; t++) begin
        t4 = 0; t16 = 0;
        for (int i = 0; i < 7; i++)  begin o4[i]  = 4'($urandom);  t4  += 64'(o4[i]);  end
        for (int i = 0; i < 19; i++) begin o16[i] = 16'($urandom); t16 += 64'(o16[i]); end
        #1;
        chk(4, 7, t4, 64'(s4), 64'(c4));
        chk(16, 19, t16, 64'(s16), 64'(c16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
