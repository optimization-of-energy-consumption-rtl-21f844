// Self-checking test of majority_voter with 30 inputs: vectors with every
// number of ones from 0 to 30 (the decision must flip between 15 and 16),
// in random positions, plus a 5-input voter checked exhaustively.
module tb_majority_voter;
  logic [29:0] bits;
  logic        major;
  logic [4:0]  bits5;
  logic        major5;
  int checks = 0, failures = 0;

  majority_voter #(.N(30)) dut (.bits(bits), .major(major));
  majority_voter #(.N(5)) dut5 (.bits(bits5), .major(major5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits5 = '0;
    for (int k = 0; k <= 30; k++) begin
      for (int r = 0; r < 50; r++) begin
        // k ones at random positions
        bits = '0;
        while ($countones(bits) < k) bits[$urandom % 30] = 1'b1;
        #1 checks++;
        if (major != (k >= 16)) begin
          failures++;
          $display("MISMATCH k=%0d bits=%b major=%b", k, bits, major);
        end
      end
    end
    for (int v = 0; v < 32; v++) begin
      bits5 = 5'(v);
      #1 checks++;
      if (major5 != ($countones(bits5) >= 3)) begin
        failures++;
        $display("MISMATCH5 bits=%b major=%b", bits5, major5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
