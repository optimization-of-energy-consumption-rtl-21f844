// Scheme II decision logic ("Module A").
//
// Inputs are the counts of Ty, T2 and T4** pairs between the current flit
// and the previous encoded flit. The document's conditions are
//   (2)  Ty > (w-1)/2      odd inversion lowers link activity
//   (3)  T2 > T4**         full inversion removes more Type II pairs than
//                          it creates
// Full inversion is chosen when (2) and (3) hold, odd inversion when only
// (2) holds, no inversion otherwise. This design adds one guard: the
// decoder recognises full inversion from the received word alone, so full
// inversion is used only when `full_ok` says the decoder would read it back
// as full; otherwise the flit is odd-inverted, which always decodes.
// Combinational.
module module_a
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic [$clog2(W-1)-1:0] ty_cnt,
  input  logic [$clog2(W-1)-1:0] t2_cnt,
  input  logic [$clog2(W-1)-1:0] t4_cnt,
  input  logic                   full_ok,
  output inv_action_e            action
);

  localparam int unsigned CW = $clog2(W - 1);

  logic odd_cond, full_cond;

  assign odd_cond  = ({1'b0, ty_cnt, 1'b0} > (CW + 2)'(W - 1));
  assign full_cond = (t2_cnt > t4_cnt);

  always_comb begin
    if (odd_cond && full_cond && full_ok) action = ACT_FULL;
    else if (odd_cond)                     action = ACT_ODD;
    else                                   action = ACT_NONE;
  end

endmodule
