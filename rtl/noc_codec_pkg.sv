// Shared definitions of the NoC link coding schemes.
//
// A w-bit link carries a (w-1)-bit body-flit payload in lanes [w-2:0] and
// one inversion flag ("inv") in lane w-1. The encoder compares the payload
// with the previously transmitted word and may invert the odd lanes
// (1, 3, 5, ...), the even lanes (0, 2, 4, ...) or all lanes before sending.
// The 2-bit action code follows the convention of the scheme III decision
// module: odd = 10, even = 01, full = 11, none = 00.
package noc_codec_pkg;

  // Link width w of the reference configuration (32-bit link).
  localparam int unsigned LINK_W = 32;

  typedef enum logic [1:0] {
    ACT_NONE = 2'b00,
    ACT_EVEN = 2'b01,
    ACT_ODD  = 2'b10,
    ACT_FULL = 2'b11
  } inv_action_e;

endpackage
