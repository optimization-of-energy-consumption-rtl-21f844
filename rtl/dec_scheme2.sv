// Scheme II link decoder.
//
// Keeps the previously received word R. For a new word Z with inv = 1 it
// re-runs the Ty pair classification of Z against R and a majority vote:
// odd inversion flips every Ty flag of the original flit, so a majority of
// 0 means odd ("half") inversion and a majority of 1 means full inversion.
// The payload is then inverted on the odd lanes or on all lanes. With
// inv = 0 the payload passes unchanged. This is the decoder structure the
// document gives (Ty blocks, majority voter, inversion logic).
//
// Timing (this design's choice): decoded payload registered, one clock
// after `link_valid`; R is updated with every received word and is zero
// after the synchronous active-low reset, matching the encoder.
module dec_scheme2
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
  logic [D-2:0]  ty;
  logic          my;
  inv_action_e   act;

  pair_classifier #(.D(D)) u_cls (
    .cur(link_data[D-1:0]), .prev(prev_word), .ty(ty), .t2(), .t4(), .te()
  );
  majority_voter #(.N(D - 1)) u_maj (.bits(ty), .major(my));

  always_comb begin
    if (!link_data[W-1]) act = ACT_NONE;
    else if (my)         act = ACT_FULL;
    else                 act = ACT_ODD;
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
          ACT_FULL: out_data <= ~link_data[D-1:0];
          default:  out_data <= link_data[D-1:0];
        endcase
      end
    end
  end

endmodule
