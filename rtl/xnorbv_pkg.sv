// xnorbv_pkg: types and widths shared by the XnorBV packet classifier.
//
// The classifier looks at the standard 5-tuple of an IPv4 packet: source
// address, destination address, source port, destination port and protocol,
// 104 bits in all. header_t packs them in that order, source address in the
// most significant bits, so a 104-bit header word can be cast straight to it.
//
// A rule holds, per field, what that field's matcher needs:
//   * addresses and protocol are ternary patterns: a value and a care mask.
//     A care bit of 0 makes that bit a wildcard ('*'); a prefix of length L is
//     a care mask with the top L bits set.
//   * ports are inclusive ranges [lo, hi].
// The field widths and the match kinds follow the design; the value/care
// encoding of a ternary bit is this implementation's choice.
package xnorbv_pkg;

  localparam int unsigned IP_W    = 32;
  localparam int unsigned PORT_W  = 16;
  localparam int unsigned PROTO_W = 8;
  localparam int unsigned HDR_W   = 2 * IP_W + 2 * PORT_W + PROTO_W;  // 104
  localparam int unsigned NUM_FIELDS = 5;

  // Order of the per-field bit vectors inside the classifier.
  typedef enum logic [2:0] {
    F_SIP   = 3'd0,
    F_DIP   = 3'd1,
    F_SPORT = 3'd2,
    F_DPORT = 3'd3,
    F_PROTO = 3'd4
  } field_e;

  typedef struct packed {
    logic [IP_W-1:0]    sip;
    logic [IP_W-1:0]    dip;
    logic [PORT_W-1:0]  sport;
    logic [PORT_W-1:0]  dport;
    logic [PROTO_W-1:0] proto;
  } header_t;

  typedef struct packed {
    logic [IP_W-1:0]    sip_val;
    logic [IP_W-1:0]    sip_care;
    logic [IP_W-1:0]    dip_val;
    logic [IP_W-1:0]    dip_care;
    logic [PORT_W-1:0]  sport_lo;
    logic [PORT_W-1:0]  sport_hi;
    logic [PORT_W-1:0]  dport_lo;
    logic [PORT_W-1:0]  dport_hi;
    logic [PROTO_W-1:0] proto_val;
    logic [PROTO_W-1:0] proto_care;
  } rule_t;

endpackage
