// Scheme II link encoder: odd, full or no inversion.
//
// First stage: pair classifiers flag, for every neighbouring lane pair, the
// Ty (odd inversion helps), T2 (Type II) and T4** (stable, unequal) cases
// between the current payload and the previous encoded payload. Second
// stage: three ones counters. Module A then picks the action from the
// document's conditions Ty > (w-1)/2 and T2 > T4**, and the flit is
// inverted accordingly; the inv lane (bit w-1) is 1 for any inversion.
//
// The decoder distinguishes odd from full inversion by re-running the Ty
// majority on the received word. That always reads back odd inversion
// correctly, but not every full inversion, so this design adds a second
// classifier on the fully inverted payload and allows full inversion only
// when the decoder's majority would come out 1 (`full_ok`); otherwise the
// flit is odd-inverted. Interface, timing and reset as in enc_scheme1:
// one clock from `in_valid` to `link_valid`, link word zero after reset.
module enc_scheme2
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

  logic [NP-1:0] ty, t2, t4, ty_full;
  logic [CW-1:0] ty_cnt, t2_cnt, t4_cnt;
  logic          full_ok;
  logic [D-1:0]  mask;

  pair_classifier #(.D(D)) u_cls (
    .cur(in_data), .prev(link_data[D-1:0]), .ty(ty), .t2(t2), .t4(t4), .te()
  );

  ones_counter #(.N(NP)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(NP)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(NP)) u_cnt_t4 (.bits(t4), .count(t4_cnt));

  // Decodability of full inversion: the decoder's view of the sent word.
  pair_classifier #(.D(D)) u_cls_full (
    .cur(~in_data), .prev(link_data[D-1:0]), .ty(ty_full), .t2(), .t4(), .te()
  );
  majority_voter #(.N(NP)) u_maj_full (.bits(ty_full), .major(full_ok));

  module_a #(.W(W)) u_dec (
    .ty_cnt(ty_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt), .full_ok(full_ok), .action(action)
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
