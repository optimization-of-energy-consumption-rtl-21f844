// Scheme III link decoder.
//
// Keeps the previously received word R. For a new word Z with inv = 1 it
// runs the Ty and Te pair classifications of Z against R, each followed by
// a majority voter:
//   Ty majority 0                  -> odd inversion  (flips every Ty flag)
//   Ty majority 1, Te majority 0   -> even inversion (flips every Te flag)
//   both majorities 1              -> full inversion
// and undoes that inversion. The encoder only chooses an even or full
// inversion that decodes this way. The document does not draw this decoder;
// it is built the same way as its scheme II decoder, with one inv lane.
//
// Timing (this design's choice): decoded payload registered, one clock
// after `link_valid`; R updated with every received word, zero after the
// synchronous active-low reset.
module dec_scheme3
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          link_valid,
  input  logic [W-1:0]  link_data,
  output logic          out_valid,
  output logic [W-2:0]  out_data,
  output inv_action_e   out_action
);

  localparam int unsigned D = W - 1;
  localparam logic [D-1:0] ODD_MASK = D'({D{2'b10}});

  logic [D-1:0]  prev_word;
  logic [D-2:0]  ty, te;
  logic          my, me;
  inv_action_e   act;

  pair_classifier #(.D(D)) u_cls (
    .cur(link_data[D-1:0]), .prev(prev_word), .ty(ty), .t2(), .t4(), .te(te)
  );
  majority_voter #(.N(D - 1)) u_maj_y (.bits(ty), .major(my));
  majority_voter #(.N(D - 1)) u_maj_e (.bits(te), .major(me));

  always_comb begin
    if (!link_data[W-1]) act = ACT_NONE;
    else if (!my)        act = ACT_ODD;
    else if (!me)        act = ACT_EVEN;
    else                 act = ACT_FULL;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_word  <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_action <= ACT_NONE;
    end else begin
      out_valid <= link_valid;
      if (link_valid) begin
        prev_word  <= link_data[D-1:0];
        out_action <= act;
        unique case (act)
          ACT_ODD:  out_data <= link_data[D-1:0] ^ ODD_MASK;
          ACT_EVEN: out_data <= link_data[D-1:0] ^ ~ODD_MASK;
          ACT_FULL: out_data <= ~link_data[D-1:0];
          default:  out_data <= link_data[D-1:0];
        endcase
      end
    end
  end

endmodule
