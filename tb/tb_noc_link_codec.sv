// End-to-end test of noc_link_codec at its default 32-bit link.
//
// One random body-flit stream (random flits, near-repeats and inverted
// repeats, with idle cycles) goes through the scheme I, II and III chains.
// Checked every cycle:
//   - each encoder's action and link word against the reference model,
//     one clock after the flit is offered, and the link holding while idle;
//   - each decoder's payload equals the flit offered two clocks earlier.
// Counted, and required to happen at least once: every action of every
// scheme, a full inversion replaced by odd inversion because the decoder
// could not have recognised it (schemes II and III), an even inversion
// dropped for the same reason (scheme III), and idle cycles.
// Also reports self and coupling transitions on each link against the
// same flits sent unencoded, and checks that each scheme lowers the
// coupling activity of this traffic.
module tb_noc_link_codec;
  import codec_ref_pkg::*;

  localparam int NFLITS = 20000;

  logic                clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [D-1:0]        in_data = '0;
  logic [2:0][1:0]     act;
  logic [2:0]          link_valid;
  logic [2:0][W-1:0]   link_word;
  logic [2:0]          out_valid;
  logic [2:0][D-1:0]   out_data;

  int checks = 0, failures = 0;
  int seen [3][4];
  int full_fallback [3];
  int even_dropped, idles;
  longint self_t [4], coup_t [4];   // index 3: unencoded link

  noc_link_codec dut (.clk, .rst_n, .in_valid, .in_data, .act, .link_valid, .link_word,
                      .out_valid, .out_data);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10 * NFLITS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t y [4];
    word_t y_old;
    pay_t  x, x_d1, x_d2;
    bit    v, v_d1, v_d2;
    int    a;
    counts_t c;
    for (int s = 0; s < 4; s++) begin
      y[s] = '0; self_t[s] = 0; coup_t[s] = 0;
      if (s < 3) begin seen[s] = '{0, 0, 0, 0}; full_fallback[s] = 0; end
    end
    even_dropped = 0; idles = 0;
    v_d1 = 0; v_d2 = 0; x_d1 = '0; x_d2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NFLITS + 2; n++) begin
      @(negedge clk);
      v = (n < NFLITS) && (($urandom % 5) != 0);
      case ($urandom % 4)
        0: x = y[3][D-1:0] ^ pay_t'(1 << ($urandom % D));
        1: x = ~y[3][D-1:0] ^ pay_t'($urandom & $urandom);
        default: x = pay_t'({$urandom, $urandom});
      endcase
      in_valid = v;
      in_data  = x;
      if (!v) idles++;
      #1;
      if (v) begin
        for (int s = 0; s < 3; s++) begin
          a = (s == 0) ? enc1(x, y[s][D-1:0]) : (s == 1) ? enc2(x, y[s][D-1:0])
                                              : enc3(x, y[s][D-1:0]);
          check(int'(act[s]) == a, "encoder action");
          seen[s][a]++;
          c = counts(x, y[s][D-1:0]);
          if (s > 0 && a == 2 && c.t2 > c.t4) full_fallback[s]++;
          if (s == 2 && a == 0 && over_half(c.te)) even_dropped++;
          y_old = y[s];
          y[s] = {a != 0, apply(a, x)};
          self_t[s] += self_toggles(y_old, y[s]);
          coup_t[s] += coupling_cost(y_old, y[s]);
        end
        y_old = y[3];
        y[3] = {1'b0, x};
        self_t[3] += self_toggles(y_old, y[3]);
        coup_t[3] += coupling_cost(y_old, y[3]);
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < 3; s++) begin
        check(link_valid[s] == v && link_word[s] == y[s], "link word");
        check(out_valid[s] == v_d1, "decoder valid two clocks after the flit");
        if (v_d1) check(out_data[s] == x_d1, "decoded payload");
      end
      v_d2 = v_d1; x_d2 = x_d1;
      v_d1 = v;    x_d1 = x;
    end
    for (int s = 0; s < 3; s++) begin
      $display("scheme %0d: none=%0d even=%0d odd=%0d full=%0d full->odd fallbacks=%0d",
               s + 1, seen[s][0], seen[s][1], seen[s][2], seen[s][3], full_fallback[s]);
      $display("scheme %0d: self toggles=%0d coupling=%0d (unencoded: %0d / %0d)",
               s + 1, self_t[s], coup_t[s], self_t[3], coup_t[3]);
      check(coup_t[s] < coup_t[3], "coupling activity reduced");
    end
    $display("scheme 3 even inversions dropped as undecodable=%0d, idle cycles=%0d",
             even_dropped, idles);
    check(seen[0][0] > 0 && seen[0][2] > 0, "scheme I used none and odd");
    check(seen[1][0] > 0 && seen[1][2] > 0 && seen[1][3] > 0, "scheme II used none, odd, full");
    check(seen[2][0] > 0 && seen[2][1] > 0 && seen[2][2] > 0 && seen[2][3] > 0,
          "scheme III used all four actions");
    check(full_fallback[1] > 0 && full_fallback[2] > 0, "full-to-odd fallback happened");
    check(even_dropped > 0, "undecodable even inversion dropped");
    check(idles > 0, "idle cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
