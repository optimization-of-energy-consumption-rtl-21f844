// Self-checking test of module_a (scheme II decision) at w = 32: every
// combination of Ty, T2 and T4** counts (0..30) with full_ok 0 and 1.
// Expected: full when Ty > 15.5, T2 > T4** and full_ok; odd when only
// Ty > 15.5; none otherwise.
module tb_module_a;
  import noc_codec_pkg::*;
  logic [4:0] ty_cnt, t2_cnt, t4_cnt;
  logic       full_ok;
  inv_action_e action, exp;
  int checks = 0, failures = 0;

  module_a #(.W(32)) dut (.ty_cnt, .t2_cnt, .t4_cnt, .full_ok, .action);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y <= 30; y++)
      for (int a = 0; a <= 30; a++)
        for (int b = 0; b <= 30; b++)
          for (int f = 0; f < 2; f++) begin
            ty_cnt = 5'(y); t2_cnt = 5'(a); t4_cnt = 5'(b); full_ok = f[0];
            if (2 * y > 31) exp = (a > b && f == 1) ? ACT_FULL : ACT_ODD;
            else            exp = ACT_NONE;
            #1 checks++;
            if (action != exp) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH ty=%0d t2=%0d t4=%0d ok=%0d got %s exp %s", y, a, b, f,
                         action.name(), exp.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
