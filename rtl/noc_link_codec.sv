// Low-power NoC link coding: scheme I, II and III side by side.
//
// Each scheme is an encoder in the sending network interface, a w-bit link
// (payload lanes [w-2:0] plus the inv lane w-1) and a decoder in the
// receiving network interface. Routers and links need no change, so the
// link is modelled as a direct connection from the encoder's output
// register to the decoder. All three chains take the same body-flit stream
// so that their link activity can be compared; index 0, 1, 2 of every
// output vector belongs to scheme I, II, III.
//
// Timing: a flit offered with `in_valid` appears encoded on `link_word`
// one clock later and decoded on `out_data` two clocks later. `act` is the
// combinational action each encoder chooses for the offered flit
// (none 00, even 01, odd 10, full 11). Synchronous active-low reset.
module noc_link_codec
  import noc_codec_pkg::*;
#(
  parameter int unsigned W = LINK_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [W-2:0]         in_data,
  output logic [2:0][1:0]      act,
  output logic [2:0]           link_valid,
  output logic [2:0][W-1:0]    link_word,
  output logic [2:0]           out_valid,
  output logic [2:0][W-2:0]    out_data
);

  inv_action_e enc_act [3];
  inv_action_e dec_act [3];

  enc_scheme1 #(.W(W)) u_enc1 (
    .clk, .rst_n, .in_valid, .in_data, .action(enc_act[0]),
    .link_valid(link_valid[0]), .link_data(link_word[0])
  );
  dec_scheme1 #(.W(W)) u_dec1 (
    .clk, .rst_n, .link_valid(link_valid[0]), .link_data(link_word[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_action(dec_act[0])
  );

  enc_scheme2 #(.W(W)) u_enc2 (
    .clk, .rst_n, .in_valid, .in_data, .action(enc_act[1]),
    .link_valid(link_valid[1]), .link_data(link_word[1])
  );
  dec_scheme2 #(.W(W)) u_dec2 (
    .clk, .rst_n, .link_valid(link_valid[1]), .link_data(link_word[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_action(dec_act[1])
  );

  enc_scheme3 #(.W(W)) u_enc3 (
    .clk, .rst_n, .in_valid, .in_data, .action(enc_act[2]),
    .link_valid(link_valid[2]), .link_data(link_word[2])
  );
  dec_scheme3 #(.W(W)) u_dec3 (
    .clk, .rst_n, .link_valid(link_valid[2]), .link_data(link_word[2]),
    .out_valid(out_valid[2]), .out_data(out_data[2]), .out_action(dec_act[2])
  );

  for (genvar s = 0; s < 3; s++) begin : g_chk
    assign act[s] = enc_act[s];

    // The action a decoder recovers is the one its encoder took.
    inv_action_e sent_act, sent_act_q;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sent_act   <= ACT_NONE;
        sent_act_q <= ACT_NONE;
      end else begin
        if (in_valid) sent_act <= enc_act[s];
        sent_act_q <= sent_act;
      end
    end

    a_action_match: assert property (@(posedge clk) disable iff (!rst_n)
      link_valid[s] |=> (out_valid[s] && dec_act[s] == sent_act_q));
  end

endmodule
