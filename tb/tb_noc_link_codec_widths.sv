// Round-trip test of noc_link_codec at two other link widths, W = 16 and
// an odd W = 9. No reference model is needed: every flit offered must come
// out of all three decoders unchanged two clocks later, and each encoder
// must use each of its actions (scheme I: none, odd; II: none, odd, full;
// III: none, even, odd, full) at least once.
module tb_noc_link_codec_widths;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [14:0] in_data = '0;
  int checks = 0, failures = 0;

  logic [2:0][1:0]  act_a, act_b;
  logic [2:0]       lv_a, lv_b, ov_a, ov_b;
  logic [2:0][15:0] lw_a;
  logic [2:0][8:0]  lw_b;
  logic [2:0][14:0] od_a;
  logic [2:0][7:0]  od_b;

  noc_link_codec #(.W(16)) dut_a (.clk, .rst_n, .in_valid, .in_data(in_data),
    .act(act_a), .link_valid(lv_a), .link_word(lw_a), .out_valid(ov_a), .out_data(od_a));
  noc_link_codec #(.W(9)) dut_b (.clk, .rst_n, .in_valid, .in_data(in_data[7:0]),
    .act(act_b), .link_valid(lv_b), .link_word(lw_b), .out_valid(ov_b), .out_data(od_b));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen_a [3][4];
    int seen_b [3][4];
    logic [14:0] x_d1 = '0, x_d2 = '0;
    bit v_d1 = 0, v_d2 = 0, v;
    for (int s = 0; s < 3; s++) begin seen_a[s] = '{0, 0, 0, 0}; seen_b[s] = '{0, 0, 0, 0}; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      v = ($urandom % 5) != 0;
      in_valid = v;
      in_data  = 15'($urandom);
      #1;
      if (v)
        for (int s = 0; s < 3; s++) begin
          seen_a[s][act_a[s]]++;
          seen_b[s][act_b[s]]++;
        end
      @(posedge clk);
      #1;
      for (int s = 0; s < 3; s++) begin
        check(ov_a[s] == v_d1 && ov_b[s] == v_d1, "decoder valid");
        if (v_d1) begin
          check(od_a[s] == x_d1, "W=16 round trip");
          check(od_b[s] == x_d1[7:0], "W=9 round trip");
        end
      end
      v_d2 = v_d1; x_d2 = x_d1;
      v_d1 = v;    x_d1 = in_data;
    end
    for (int s = 0; s < 3; s++)
      $display("scheme %0d W=16 none/even/odd/full %0d/%0d/%0d/%0d  W=9 %0d/%0d/%0d/%0d", s + 1,
               seen_a[s][0], seen_a[s][1], seen_a[s][2], seen_a[s][3],
               seen_b[s][0], seen_b[s][1], seen_b[s][2], seen_b[s][3]);
    for (int s = 0; s < 3; s++) begin
      check(seen_a[s][0] > 0 && seen_a[s][2] > 0 && seen_b[s][0] > 0 && seen_b[s][2] > 0,
            "none and odd used");
      if (s > 0) check(seen_a[s][3] > 0 && seen_b[s][3] > 0, "full used");
    end
    check(seen_a[2][1] > 0 && seen_b[2][1] > 0, "even used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
