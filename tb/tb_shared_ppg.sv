// tb_shared_ppg: the shared partial product generator in each mode, all operand pairs
// below the modulus at n = 4 and 8:
//   2^n+1: sum(rows) + 2^n (2^n - 1 - n) = x y (mod 2^n + 1)
//   2^n-1: sum(rows) = x y (mod 2^n - 1), extra rows zero
//   2^n  : sum(rows) = x y (mod 2^n),     extra rows zero
module tb_shared_ppg;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  modsel_t sel;
  logic [4:0] x4, y4;
  logic [8:0] x8, y8;
  logic [6:0][3:0]  pp4;
  logic [10:0][7:0] pp8;

  shared_ppg #(.N(4)) u4 (.sel(sel), .x(x4), .y(y4), .pp(pp4));
  shared_ppg #(.N(8)) u8 (.sel(sel), .x(x8), .y(y8), .pp(pp8));

  function automatic logic sum_ok(input int n, input longint unsigned rows,
                                  input longint unsigned x, input longint unsigned y);
    longint unsigned m, k;
    case (sel)
      MOD_2N_M1: begin m = (64'd1 << n) - 1; k = 0; end
      MOD_2N:    begin m = (64'd1 << n);     k = 0; end
      default:   begin m = (64'd1 << n) + 1;
                       k = (64'd1 << n) * ((64'd1 << n) - 1 - longint'(n)); end
    endcase
    return (rows + k) % m == (x * y) % m;
  endfunction

  task automatic chk(input string nm, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%s x8=%0d y8=%0d", nm, sel.name(), x8, y8);
    end
  endtask

  initial begin
    longint unsigned r;
    int lim;
    for (int m = 0; m < 3; m++) begin
      sel = modsel_t'(m);
      lim = (sel == MOD_2N_P1) ? 256 : 255;
      for (int a = 0; a <= lim; a++) begin
        for (int b = 0; b <= lim; b++) begin
          x8 = 9'(a); y8 = 9'(b);
          x4 = 5'(a % (lim == 256 ? 17 : 16)); y4 = 5'(b % (lim == 256 ? 17 : 16));
          #1;
          r = 0; for (int i = 0; i < 11; i++) r += 64'(pp8[i]);
          chk("n8", sum_ok(8, r, 64'(x8), 64'(y8)));
          r = 0; for (int i = 0; i < 7; i++) r += 64'(pp4[i]);
          chk("n4", sum_ok(4, r, 64'(x4), 64'(y4)));
          if (sel != MOD_2N_P1) chk("extra rows", pp8[10:8] == '0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
