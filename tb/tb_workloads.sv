// tb_workloads: the configurations the multipliers were characterised in: operand
// widths n = 4, 8, 16 and 32, and for the shared-moduli comparison n = 8, 16, 32 with
// Sklansky (SKL), Brent-Kung (BK) and Kogge-Stone (KS) prefix adders. Each
// configuration runs all four multipliers and the look-ahead shared adder of the top on
// random and corner operands in all three moduli.
module tb_workloads;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  localparam int NCFG = 10;
  int   c_chk [NCFG];
  int   c_fail[NCFG];
  logic c_done[NCFG];

  wl_runner #(.N(4),  .TREE(SKLANSKY))    r0 (.checks(c_chk[0]), .failures(c_fail[0]), .done(c_done[0]));
  wl_runner #(.N(8),  .TREE(SKLANSKY))    r1 (.checks(c_chk[1]), .failures(c_fail[1]), .done(c_done[1]));
  wl_runner #(.N(8),  .TREE(BRENT_KUNG))  r2 (.checks(c_chk[2]), .failures(c_fail[2]), .done(c_done[2]));
  wl_runner #(.N(8),  .TREE(KOGGE_STONE)) r3 (.checks(c_chk[3]), .failures(c_fail[3]), .done(c_done[3]));
  wl_runner #(.N(16), .TREE(SKLANSKY))    r4 (.checks(c_chk[4]), .failures(c_fail[4]), .done(c_done[4]));
  wl_runner #(.N(16), .TREE(BRENT_KUNG))  r5 (.checks(c_chk[5]), .failures(c_fail[5]), .done(c_done[5]));
  wl_runner #(.N(16), .TREE(KOGGE_STONE)) r6 (.checks(c_chk[6]), .failures(c_fail[6]), .done(c_done[6]));
  wl_runner #(.N(32), .TREE(SKLANSKY))    r7 (.checks(c_chk[7]), .failures(c_fail[7]), .done(c_done[7]));
  wl_runner #(.N(32), .TREE(BRENT_KUNG))  r8 (.checks(c_chk[8]), .failures(c_fail[8]), .done(c_done[8]));
  wl_runner #(.N(32), .TREE(KOGGE_STONE)) r9 (.checks(c_chk[9]), .failures(c_fail[9]), .done(c_done[9]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < NCFG; i++) wait (c_done[i] === 1'b1);
    for (int i = 0; i < NCFG; i++) begin
      checks += c_chk[i];
      failures += c_fail[i];
      $display("  configuration %0d: %0d checks, %0d failures", i, c_chk[i], c_fail[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
