// Self-checking test of ones_counter: a 30-input counter (the pair count
// of a 32-bit link) against $countones on all-zero, all-one, one-hot and
// random inputs, and a 4-input counter exhaustively.
module tb_ones_counter;
  logic [29:0] bits;
  logic [4:0]  count;
  logic [3:0]  bits4;
  logic [2:0]  count4;
  int checks = 0, failures = 0;

  ones_counter #(.N(30)) dut (.bits(bits), .count(count));
  ones_counter #(.N(4)) dut4 (.bits(bits4), .count(count4));

  task automatic check30();
    #1 checks++;
    if (int'(count) != $countones(bits)) begin
      failures++;
      $display("MISMATCH bits=%b count=%0d", bits, count);
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
    bits4 = '0;
    bits = '0;   check30();
    bits = '1;   check30();
    for (int i = 0; i < 30; i++) begin bits = 30'(1) << i; check30(); end
    for (int n = 0; n < 3000; n++) begin bits = 30'($urandom) & 30'($urandom | $urandom); check30(); end
    for (int v = 0; v < 16; v++) begin
      bits4 = 4'(v);
      #1 checks++;
      if (int'(count4) != $countones(bits4)) begin
        failures++;
        $display("MISMATCH4 bits=%b count=%0d", bits4, count4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
