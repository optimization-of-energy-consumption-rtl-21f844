// Self-checking test of enc_scheme2 at the 32-bit link size. Random body
// flits, mixed with near-repeats and inverted repeats of the previous flit,
// are offered with random idle cycles. For every flit the combinational
// action is compared with the reference model's decision, and one clock
// later the link word (inv lane + inverted payload) and link_valid are
// checked; during idle cycles the link word must hold. Each action the
// scheme can take must occur at least once.
module tb_enc_scheme2;
  import codec_ref_pkg::*;
  import noc_codec_pkg::inv_action_e;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [D-1:0] in_data = '0;
  inv_action_e  action;
  logic         link_valid;
  logic [W-1:0] link_data;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  enc_scheme2 dut (.clk, .rst_n, .in_valid, .in_data, .action, .link_valid, .link_data);

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
    word_t y = '0;
    int    exp_act;
    bit    v;
    pay_t  x;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(link_data == '0 && !link_valid, "reset state");
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      v = ($urandom % 4) != 0;
      case ($urandom % 4)
        0: x = y[D-1:0] ^ pay_t'(1 << ($urandom % D));
        1: x = ~y[D-1:0] ^ pay_t'($urandom & $urandom);
        default: x = pay_t'({$urandom, $urandom});
      endcase
      in_valid = v;
      in_data  = x;
      #1;
      exp_act = enc2(x, y[D-1:0]);
      if (v) begin
        check(int'(action) == exp_act, "action");
        seen[exp_act]++;
      end
      @(posedge clk);
      #1;
      check(link_valid == v, "link_valid timing");
      if (v) y = {exp_act != 0, apply(exp_act, x)};
      check(link_data == y, "link word");
    end
    check(seen[0] > 0 && seen[2] > 0 && seen[3] > 0, "none, odd and full all used");
    $display("actions none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
