// tb_ccsa: the composite CSA in each mode against modular arithmetic:
//   2^n-1: a + b + d = s + cc        (mod 2^n - 1)
//   2^n  : a + b + d = s + cc        (mod 2^n)
//   2^n+1: a + b + d = s + cc + 2^n  (mod 2^n + 1)
// Exhaustive at n = 4, random at n = 16.
module tb_ccsa;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t     sel;
  logic [3:0]  a4, b4, d4, s4, c4;
  logic [15:0] a16, b16, d16, s16, c16;

  ccsa #(.N(4))  u4  (.sel(sel), .a(a4), .b(b4), .d(d4), .s(s4), .cc(c4));
  ccsa #(.N(16)) u16 (.sel(sel), .a(a16), .b(b16), .d(d16), .s(s16), .cc(c16));

  task automatic chk(input int n, input longint unsigned lhs, input longint unsigned s,
                     input longint unsigned c);
    longint unsigned m, rhs;
    case (sel)
      MOD_2N_M1: begin m = (64'd1 << n) - 1; rhs = s + c; end
      MOD_2N:    begin m = (64'd1 << n);     rhs = s + c; end
      default:   begin m = (64'd1 << n) + 1; rhs = s + c + (64'd1 << n); end
    endcase
    checks++;
    if (lhs % m != rhs % m) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%s n=%0d lhs=%0d rhs=%0d", sel.name(), n, lhs, rhs);
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      sel = modsel_t'(m);
      for (int v = 0; v < 4096; v++) begin
        {a4, b4, d4} = 12'(v);
        a16 = 16'($urandom); b16 = 16'($urandom); d16 = 16'($urandom);
        #1;
        chk(4, 64'(a4) + 64'(b4) + 64'(d4), 64'(s4), 64'(c4));
        chk(16, 64'(a16) + 64'(b16) + 64'(d16), 64'(s16), 64'(c16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
