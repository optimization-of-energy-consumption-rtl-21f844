// Self-checking test of module_c (scheme III decision) at w = 32: every
// combination of Ty and Te counts (0..30) against T2/T4** pairs on both
// sides of T2 > T4** and all four full_ok/even_ok combinations.
// Expected: full (11) when Ty > 15.5, T2 > T4** and full_ok; odd (10) when
// Ty > 15.5 otherwise; even (01) when Ty <= 15.5, Te > 15.5 and even_ok;
// none (00) otherwise.
module tb_module_c;
  import noc_codec_pkg::*;
  logic [4:0] ty_cnt, te_cnt, t2_cnt, t4_cnt;
  logic       full_ok, even_ok;
  inv_action_e action;
  logic [1:0] exp;
  int checks = 0, failures = 0;

  module_c #(.W(32)) dut (.ty_cnt, .te_cnt, .t2_cnt, .t4_cnt, .full_ok, .even_ok, .action);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y <= 30; y++)
      for (int e = 0; e <= 30; e++)
        for (int r = 0; r < 6; r++)
          for (int ok = 0; ok < 4; ok++) begin
            int a = int'($urandom % 31);
            int b = (r < 3) ? int'($urandom % 31) : a;   // some ties
            if (r == 1 && a > 0) b = a - 1;
            ty_cnt = 5'(y); te_cnt = 5'(e); t2_cnt = 5'(a); t4_cnt = 5'(b);
            full_ok = ok[0]; even_ok = ok[1];
            if (2 * y > 31)      exp = (a > b && ok[0]) ? 2'b11 : 2'b10;
            else if (2 * e > 31) exp = ok[1] ? 2'b01 : 2'b00;
            else                 exp = 2'b00;
            #1 checks++;
            if (action != exp) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH ty=%0d te=%0d t2=%0d t4=%0d ok=%b got %b exp %b", y, e, a, b,
                         ok[1:0], action, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
