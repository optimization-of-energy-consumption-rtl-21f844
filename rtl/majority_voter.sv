// Majority voter: `major` is 1 when `bits` holds more ones than zeros.
//
// Used by the scheme I encoder to decide odd inversion and by the scheme
// II/III decoders to tell the inversion type back. With N = w-2 pair flags
// and an even link width w, "more ones than zeros" is the same test as the
// document's count > (w-1)/2. Built from a ones counter and a comparator;
// combinational.
module majority_voter #(
  parameter int unsigned N = 30
) (
  input  logic [N-1:0] bits,
  output logic         major
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] count;

  ones_counter #(.N(N)) u_cnt (.bits(bits), .count(count));

  assign major = ({1'b0, count, 1'b0} > (CW + 2)'(N));

endmodule
