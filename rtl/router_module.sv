// router_module: the IP router stream module.
//
// A stream interface controller (sic) in front of the IP router datapath
// (ip_router), with the uniform stream-module interface: on each side an
// 8-bit DATA bus, a 4-bit CBUS and the Pkt_start, Prgm and Valid signals
// going downstream, Rdy coming back. Programming runs that start with
// MODULE_ID rewrite the route table; other runs pass through. Packets leave
// 20 clocks after they enter, with the TTL decremented and with the output
// port and nexthop on CBUS; rejected packets leave as idle slots. The
// structure follows the prototype's router module; see sic and ip_router for
// the choices made inside.
// Interface: proc_pkt_o pulses when a header is processed, chk_o then holds
// the check results (for observation).
module router_module
  import stream_pkg::*;
#(
  parameter logic [7:0]            MODULE_ID   = 8'h01,
  parameter route_t [N_ROUTES-1:0] ROUTES_INIT = DEFAULT_ROUTES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  stream_t up_i,
  output logic    up_rdy_o,
  output stream_t dn_o,
  input  logic    dn_rdy_i,
  output logic    proc_pkt_o,
  output chk_t    chk_o
);

  localparam int CFG_AW = 6;

  logic              en, cfg_we, invalid_pkt;
  logic [CFG_AW-1:0] cfg_addr;
  logic [7:0]        cfg_data;
  stream_t           mod_in, mod_out;

  sic #(.MODULE_ID(MODULE_ID), .CFG_AW(CFG_AW)) u_sic (
    .clk, .rst_n,
    .up_i, .up_rdy_o, .dn_o, .dn_rdy_i,
    .en_o          (en),
    .mod_in_o      (mod_in),
    .cfg_we_o      (cfg_we),
    .cfg_addr_o    (cfg_addr),
    .cfg_data_o    (cfg_data),
    .mod_out_i     (mod_out),
    .invalid_pkt_i (invalid_pkt)
  );

  ip_router #(.ROUTES_INIT(ROUTES_INIT), .CFG_AW(CFG_AW)) u_router (
    .clk, .rst_n,
    .en_i          (en),
    .in_i          (mod_in),
    .cfg_we_i      (cfg_we),
    .cfg_addr_i    (cfg_addr),
    .cfg_data_i    (cfg_data),
    .out_o         (mod_out),
    .invalid_pkt_o (invalid_pkt),
    .proc_pkt_o,
    .chk_o
  );

endmodule
