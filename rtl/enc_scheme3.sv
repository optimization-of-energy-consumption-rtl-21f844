// Scheme III link encoder: odd, even, full or no inversion.
//
// Extends scheme II with Te flags (even inversion helps: Type II, even lane
// alone toggling, odd lane alone toggling from equal values) and a fourth
// ones counter. Module C picks among odd (10), even (01), full (11) and
// none (00) from the conditions Te > (w-1)/2, Ty > (w-1)/2 and T2 > T4**.
// The link still has a single inv lane, set for any inversion.
//
// The decoder tells the three inversions apart from the received word
// alone: Ty majority 0 means odd; Ty majority 1 with Te majority 0 means
// even; both 1 means full. Odd inversion chosen by condition (5) always
// reads back as odd and even inversion chosen by (4) always gives a Te
// majority of 0, so this design checks only what is not guaranteed: the Ty
// majority of the even-inverted word (`even_ok`) and both majorities of the
// fully inverted word (`full_ok`). Interface, timing and reset as in
// enc_scheme1.
module enc_scheme3
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-2:0]  in_data,
  output inv_action_e   action,
  output logic          link_valid,
  output logic [W-1:0]  link_data
);

  localparam int unsigned D  = W - 1;
  localparam int unsigned NP = D - 1;
  localparam int unsigned CW = $clog2(NP + 1);
  localparam logic [D-1:0] ODD_MASK = D'({D{2'b10}});

  logic [NP-1:0] ty, te, t2, t4;
  logic [NP-1:0] ty_full, te_full, ty_even;
  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4_cnt;
  logic          my_full, me_full, even_ok;
  logic [D-1:0]  mask;

  pair_classifier #(.D(D)) u_cls (
    .cur(in_data), .prev(link_data[D-1:0]), .ty(ty), .t2(t2), .t4(t4), .te(te)
  );

  ones_counter #(.N(NP)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(NP)) u_cnt_te (.bits(te), .count(te_cnt));
  ones_counter #(.N(NP)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(NP)) u_cnt_t4 (.bits(t4), .count(t4_cnt));

  // Decoder's view of the fully inverted and the even-inverted word.
  pair_classifier #(.D(D)) u_cls_full (
    .cur(~in_data), .prev(link_data[D-1:0]), .ty(ty_full), .t2(), .t4(), .te(te_full)
  );
  majority_voter #(.N(NP)) u_maj_full_y (.bits(ty_full), .major(my_full));
  majority_voter #(.N(NP)) u_maj_full_e (.bits(te_full), .major(me_full));

  pair_classifier #(.D(D)) u_cls_even (
    .cur(in_data ^ ~ODD_MASK), .prev(link_data[D-1:0]), .ty(ty_even), .t2(), .t4(), .te()
  );
  majority_voter #(.N(NP)) u_maj_even_y (.bits(ty_even), .major(even_ok));

  module_c #(.W(W)) u_dec (
    .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt),
    .full_ok(my_full & me_full), .even_ok(even_ok), .action(action)
  );

  always_comb begin
    unique case (action)
      ACT_ODD:  mask = ODD_MASK;
      ACT_EVEN: mask = ~ODD_MASK;
      ACT_FULL: mask = '1;
      default:  mask = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_data  <= '0;
    end else begin
      link_valid <= in_valid;
      if (in_valid) link_data <= {action != ACT_NONE, in_data ^ mask};
    end
  end

endmodule
