// stream_router_top: the stream-based router prototype chain.
//
// Two stream modules in a row: the packet generator produces IPv4 packets
// (and, on request, a programming run carrying a new route table), and the
// IP router module checks each header, filters net-10 sources, decrements
// the TTL, looks up the route and puts output port and nexthop on the CBUS.
// The router's output stream is what the packet sink would capture; it is
// brought out on sink_o, with Rdy from the sink on sink_rdy_i. Rdy low at
// the sink stops both modules in the same cycle. The three-module chain
// follows the prototype; the sink is external here.
// Timing: one octet per clock, 20 clocks from generator to sink_o.
module stream_router_top
  import stream_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  gen_enable_i,
  input  logic                  prgm_req_i,
  input  route_t [N_ROUTES-1:0] prgm_table_i,
  output stream_t               sink_o,
  input  logic                  sink_rdy_i,
  output logic [15:0]           gen_pkts_o,
  output logic                  rtr_proc_o,
  output chk_t                  rtr_chk_o
);

  stream_t gen2rtr;
  logic    rtr_rdy;

  packet_generator u_gen (
    .clk, .rst_n,
    .enable_i     (gen_enable_i),
    .prgm_req_i,
    .prgm_table_i,
    .dn_o         (gen2rtr),
    .dn_rdy_i     (rtr_rdy),
    .pkt_count_o  (gen_pkts_o)
  );

  router_module u_router (
    .clk, .rst_n,
    .up_i       (gen2rtr),
    .up_rdy_o   (rtr_rdy),
    .dn_o       (sink_o),
    .dn_rdy_i   (sink_rdy_i),
    .proc_pkt_o (rtr_proc_o),
    .chk_o      (rtr_chk_o)
  );

endmodule
