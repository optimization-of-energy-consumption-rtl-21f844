// Population counter (the "1s" block of the scheme II and III encoders).
//
// Counts the ones in `bits`. Combinational adder chain; a synthesis tool
// is free to restructure it into a tree. The count is $clog2(N+1) bits
// wide, which for the 30 pair flags of a 32-bit link is the 5 bits the
// document gives (log2 w).
module ones_counter #(
  parameter int unsigned N = 30
) (
  input  logic [N-1:0]             bits,
  output logic [$clog2(N+1)-1:0]   count
);

  localparam int unsigned CW = $clog2(N + 1);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < N; i++)
      count = count + CW'(bits[i]);
  end

endmodule
