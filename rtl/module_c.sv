// Scheme III decision logic ("Module C").
//
// Inputs are the counts of Ty, Te, T2 and T4** pairs. The document's
// conditions are
//   (4)  Te > (w-1)/2      even inversion lowers link activity
//   (5)  Ty > (w-1)/2      odd inversion lowers link activity
//   (6)  T2 > T4**         full inversion pays off
// and the action codes odd = 10, even = 01, full = 11, none = 00.
// The order among the conditions is this design's choice: when (5) holds,
// full inversion if (6) also holds, else odd; when (5) fails but (4) holds,
// even inversion; otherwise none. As in scheme II, full and even inversion
// are used only when the decoder would recognise them (`full_ok`,
// `even_ok`); full falls back to odd, even falls back to none.
// Combinational.
module module_c
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic [$clog2(W-1)-1:0] ty_cnt,
  input  logic [$clog2(W-1)-1:0] te_cnt,
  input  logic [$clog2(W-1)-1:0] t2_cnt,
  input  logic [$clog2(W-1)-1:0] t4_cnt,
  input  logic                   full_ok,
  input  logic                   even_ok,
  output inv_action_e            action
);

  localparam int unsigned CW = $clog2(W - 1);

  logic odd_cond, even_cond, full_cond;

  assign even_cond = ({1'b0, te_cnt, 1'b0} > (CW + 2)'(W - 1));
  assign odd_cond  = ({1'b0, ty_cnt, 1'b0} > (CW + 2)'(W - 1));
  assign full_cond = (t2_cnt > t4_cnt);

  always_comb begin
    if (odd_cond && full_cond && full_ok) action = ACT_FULL;
    else if (odd_cond)                     action = ACT_ODD;
    else if (even_cond && even_ok)         action = ACT_EVEN;
    else                                   action = ACT_NONE;
  end

endmodule
