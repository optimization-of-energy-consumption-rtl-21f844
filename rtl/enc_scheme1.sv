// Scheme I link encoder: odd inversion or none.
//
// The (w-1)-bit payload `in_data` is compared pair by pair with the payload
// of the previously sent word (the encoder's own output register). Each pair
// flag Ty says that inverting the odd lanes would lower that pair's coupling
// activity; when a majority of the pairs say so, the odd lanes (1, 3, 5, ...)
// are inverted and the inv lane (bit w-1) is set. This follows the
// document's scheme I datapath: Ty blocks, majority voter, odd inverter.
//
// Interface and timing (this design's choice): a flit is taken in every
// cycle `in_valid` is high; the encoded word appears on `link_data` with
// `link_valid` one clock later and stays there until the next flit. `action`
// is the combinational decision for the flit on `in_data`. Reset is
// synchronous and active low and clears the link word to zero, the value
// the decoder also assumes after reset.
module enc_scheme1
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

  localparam int unsigned D = W - 1;
  localparam logic [D-1:0] ODD_MASK = D'({D{2'b10}});

  logic [D-2:0] ty;
  logic         odd;

  pair_classifier #(.D(D)) u_cls (
    .cur (in_data),
    .prev(link_data[D-1:0]),
    .ty  (ty),
    .t2  (),
    .t4  (),
    .te  ()
  );

  majority_voter #(.N(D - 1)) u_maj (.bits(ty), .major(odd));

  assign action = odd ? ACT_ODD : ACT_NONE;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_data  <= '0;
    end else begin
      link_valid <= in_valid;
      if (in_valid) link_data <= {odd, in_data ^ (odd ? ODD_MASK : '0)};
    end
  end

endmodule
