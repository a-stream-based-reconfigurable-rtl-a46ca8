// stream_pkg: types and constants shared by the stream modules of the
// reconfigurable router prototype.
//
// A stream word is what crosses the uniform interface between two stream
// modules in one clock: an 8-bit data octet, a 4-bit control data bus (CBUS)
// for results one module hands to the next (nexthop, output port), and the
// control signals Pkt_start, Prgm and Valid. Rdy runs the other way and is a
// separate signal. The 8/4/4 split of a 16-bit module bus follows the
// prototype; the programming-run format and the route-table entry layout are
// this design's own choices (see sic.sv and rte_lu.sv).
package stream_pkg;

  localparam int DATA_W    = 8;
  localparam int CBUS_W    = 4;
  localparam int HDR_BYTES = 20;   // IPv4 header without options

  // One word on a module-to-module stream bus. Prgm marks programming data,
  // Valid marks packet data; a word with neither is an idle slot.
  typedef struct packed {
    logic              pkt_start;
    logic              prgm;
    logic              valid;
    logic [DATA_W-1:0] data;
    logic [CBUS_W-1:0] cbus;
  } stream_t;

  // One stage of the router's header shift register.
  typedef struct packed {
    logic              pkt_start;
    logic              prgm;
    logic              valid;
    logic [DATA_W-1:0] data;
  } sr_word_t;

  // Route table entry: a destination matches when (dst & mask) == (net & mask).
  typedef struct packed {
    logic [31:0] net;
    logic [31:0] mask;
    logic [31:0] nexthop;
    logic [3:0]  port;
  } route_t;

  localparam int N_ROUTES          = 4;
  localparam int ROUTE_ENTRY_BYTES = 13;  // net(4) mask(4) nexthop(4) port(1)
  localparam int ROUTE_TABLE_BYTES = N_ROUTES * ROUTE_ENTRY_BYTES;

  // Results of the router's header checks for one packet.
  typedef struct packed {
    logic runt;         // first octet reached the output before the header was complete
    logic hdr_bad;      // version != 4, IHL != 5 or total length < 20
    logic ttl_expired;  // TTL 0 or 1
    logic src_filtered; // source address in the filtered net
    logic no_route;     // no route table entry matched
  } chk_t;

  // Default route table: one route per default generator destination.
  localparam route_t [N_ROUTES-1:0] DEFAULT_ROUTES = '{
    '{net: 32'h80AD_0000, mask: 32'hFFFF_0000, nexthop: 32'h80AD_0001, port: 4'd3},  // 128.173/16
    '{net: 32'hAC10_0000, mask: 32'hFFF0_0000, nexthop: 32'hAC10_0001, port: 4'd2},  // 172.16/12
    '{net: 32'hC0A8_1400, mask: 32'hFFFF_FF00, nexthop: 32'hC0A8_1401, port: 4'd1},  // 192.168.20/24
    '{net: 32'hC0A8_0A00, mask: 32'hFFFF_FF00, nexthop: 32'hC0A8_0A01, port: 4'd0}   // 192.168.10/24
  };

endpackage
