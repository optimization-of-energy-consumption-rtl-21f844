// Coupling-transition classifier for adjacent lane pairs (the Ty, T2, T4**
// and Te blocks of the encoder and decoder front ends).
//
// For every pair of neighbouring payload lanes (i, i+1) it compares the
// current flit `cur` with the previous encoded flit `prev`. Of the two lanes
// of a pair, the one with the odd index is the "odd" lane (flipped by odd
// inversion), the other the "even" lane. Writing te/to for "even/odd lane
// toggles" and eq for "the two lanes held equal values before":
//   ty : odd inversion lowers coupling activity of the pair:
//        T1*  (even lane alone toggles, eq), T1** (odd lane alone toggles),
//        Type II (both toggle in opposite directions).
//        Odd inversion turns these into Type III, Type IV and Type I.
//   t2 : Type II pair (both toggle, opposite directions). Full inversion
//        turns it into Type IV.
//   t4 : T4**, a Type IV pair (no toggle) whose lanes differ (01/10); full
//        inversion turns it into Type II.
//   te : even inversion lowers coupling activity: Type II, even lane alone
//        toggles, or odd lane alone toggles with eq.
// A useful property: odd inversion of `cur` complements every ty flag and
// even inversion complements every te flag, which is what lets a decoder
// tell the action back from the received word.
// The transition classes and their mapping follow the document's tables;
// pairs are formed over the payload lanes only (D-1 pairs), a choice of
// this design. Purely combinational.
module pair_classifier #(
  parameter int unsigned D = 31            // payload lanes (w-1)
) (
  input  logic [D-1:0] cur,
  input  logic [D-1:0] prev,
  output logic [D-2:0] ty,
  output logic [D-2:0] t2,
  output logic [D-2:0] t4,
  output logic [D-2:0] te
);

  for (genvar i = 0; i < D - 1; i++) begin : g_pair
    // Lane indices of the odd and even member of pair (i, i+1).
    localparam int unsigned LO = (i % 2 == 1) ? i : i + 1;
    localparam int unsigned LE = (i % 2 == 1) ? i + 1 : i;

    logic tog_o, tog_e, eq;
    assign tog_o = cur[LO] ^ prev[LO];
    assign tog_e = cur[LE] ^ prev[LE];
    assign eq    = prev[LO] ~^ prev[LE];

    assign t2[i] = tog_o & tog_e & ~eq;
    assign t4[i] = ~tog_o & ~tog_e & ~eq;
    assign ty[i] = (tog_e & ~tog_o & eq) | (tog_o & ~tog_e) | t2[i];
    assign te[i] = (tog_e & ~tog_o) | (tog_o & ~tog_e & eq) | t2[i];
  end

endmodule
