// Self-checking test of dec_scheme2 at the 32-bit link size. The testbench
// encodes random body flits with the reference model of the scheme and
// drives the encoded words, with idle cycles in between, into the decoder.
// One clock after each word the decoded payload must equal the original
// flit, the recovered action the one the reference encoder took, and
// out_valid must follow link_valid. Each action must occur at least once.
module tb_dec_scheme2;
  import codec_ref_pkg::*;
  import noc_codec_pkg::inv_action_e;

  logic         clk = 1'b0, rst_n = 1'b0, link_valid = 1'b0;
  logic [W-1:0] link_data = '0;
  logic         out_valid;
  logic [D-1:0] out_data;
  inv_action_e  out_action;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  dec_scheme2 dut (.clk, .rst_n, .link_valid, .link_data, .out_valid, .out_data, .out_action);

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
    int    act;
    bit    v;
    pay_t  x;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!out_valid, "reset state");
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      v = ($urandom % 4) != 0;
      case ($urandom % 4)
        0: x = y[D-1:0] ^ pay_t'(1 << ($urandom % D));
        1: x = ~y[D-1:0] ^ pay_t'($urandom & $urandom);
        default: x = pay_t'({$urandom, $urandom});
      endcase
      act = enc2(x, y[D-1:0]);
      if (v) y = {act != 0, apply(act, x)};
      link_valid = v;
      link_data  = y;
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid timing");
      if (v) begin
        check(out_data == x, "decoded payload");
        check(int'(out_action) == act, "recovered action");
        seen[act]++;
      end
    end
    check(seen[0] > 0 && seen[2] > 0 && seen[3] > 0, "none, odd and full all used");
    $display("actions none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
