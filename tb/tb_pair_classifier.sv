// Self-checking test of pair_classifier at the 32-bit link size (31 payload
// lanes): every pair flag is compared with a table lookup of the pair's
// before/after values, over all 16 before/after combinations placed on
// every pair position plus random flits. Also checks that odd inversion
// complements the Ty flags and even inversion the Te flags.
module tb_pair_classifier;
  import codec_ref_pkg::*;

  logic [D-1:0]  cur, prev;
  logic [NP-1:0] ty, t2, t4, te;
  logic [NP-1:0] ty_o, te_e;
  int checks = 0, failures = 0;

  pair_classifier #(.D(D)) dut (.cur(cur), .prev(prev), .ty(ty), .t2(t2), .t4(t4), .te(te));
  pair_classifier #(.D(D)) dut_odd (.cur(cur ^ odd_mask()), .prev(prev), .ty(ty_o), .t2(), .t4(), .te());
  pair_classifier #(.D(D)) dut_even (.cur(cur ^ ~odd_mask()), .prev(prev), .ty(), .t2(), .t4(), .te(te_e));

  task automatic check_now();
    for (int i = 0; i < NP; i++) begin
      logic [1:0] p = pair_of(prev, i);
      logic [1:0] c = pair_of(cur, i);
      checks++;
      if (ty[i] != is_ty(p, c) || te[i] != is_te(p, c) ||
          t2[i] != is_t2(p, c) || t4[i] != is_t4(p, c)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH pair %0d p=%b c=%b ty=%b te=%b t2=%b t4=%b", i, p, c,
                   ty[i], te[i], t2[i], t4[i]);
      end
    end
    checks++;
    if (ty_o != ~ty || te_e != ~te) begin
      failures++;
      if (failures < 10) $display("COMPLEMENT fails cur=%h prev=%h", cur, prev);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every before/after value of one pair, repeated over the whole flit.
    for (int pc = 0; pc < 16; pc++) begin
      for (int i = 0; i < D; i++) begin
        prev[i] = pc[i % 2];
        cur[i]  = pc[2 + (i % 2)];
      end
      #1 check_now();
    end
    for (int n = 0; n < 4000; n++) begin
      cur  = D'({$urandom, $urandom});
      prev = D'({$urandom, $urandom});
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
