// Scheme I link decoder.
//
// The only inversion scheme I performs is odd inversion, so the decoder
// inverts the odd payload lanes (1, 3, 5, ...) of the received word when its
// inv lane (bit w-1) is high and passes the payload through otherwise.
//
// Timing (this design's choice): the decoded payload is registered and
// appears one clock after `link_valid`, with `out_valid`. `out_action` is
// the recovered action of that flit. Synchronous active-low reset.
module dec_scheme1
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

  logic inv;
  assign inv = link_data[W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_action <= ACT_NONE;
    end else begin
      out_valid <= link_valid;
      if (link_valid) begin
        out_data   <= link_data[D-1:0] ^ (inv ? ODD_MASK : '0);
        out_action <= inv ? ACT_ODD : ACT_NONE;
      end
    end
  end

endmodule
