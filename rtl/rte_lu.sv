// rte_lu: the router's route lookup unit (RTE_LU).
//
// Holds a table of N_ROUTES routes (four in the prototype). The destination
// address from the header shift register is compared with every entry at
// once; the lowest-numbered entry with (dst & mask) == (net & mask) wins.
// When the header is processed (proc_i) the winner's nexthop address and
// output port are latched, and while the packet leaves they are multiplexed
// onto the 4-bit CBUS, indexed by the leaving octet's position idx_i:
//   octet 0      : output port (leaves in the cycle of proc_i)
//   octets 1..8  : nexthop address, most significant nibble first
//   other octets : 0
// The table is written octet by octet through the stream interface
// controller's programming port: entry e occupies addresses 13e..13e+12 as
// net (4 octets, MSB first), mask (4), nexthop (4), port (low nibble of 1).
// Reset loads DEFAULT_ROUTES. Four routes, a 32-bit lookup and nexthop/port
// on the CBUS follow the prototype; the match rule, nibble order and table
// layout are this design's.
// Timing: hit_o is combinational from dst_i; in the cycle of proc_i the
// CBUS already shows the new port (octet 0 leaves in that cycle).
module rte_lu
  import stream_pkg::*;
#(
  parameter route_t [N_ROUTES-1:0] ROUTES_INIT = DEFAULT_ROUTES,
  parameter int                    CFG_AW      = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we_i,
  input  logic [CFG_AW-1:0] cfg_addr_i,
  input  logic [7:0]        cfg_data_i,
  input  logic [31:0]       dst_i,
  input  logic              proc_i,
  output logic              hit_o,
  input  logic [15:0]       idx_i,
  output logic [3:0]        cbus_o
);

  route_t      tbl [N_ROUTES];
  logic [31:0] nh_live, nh_q;
  logic [3:0]  port_live;

  // Table writes from the programming stream.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ROUTES; e++) tbl[e] <= ROUTES_INIT[e];
    end else if (cfg_we_i) begin
      for (int e = 0; e < N_ROUTES; e++) begin
        for (int o = 0; o < ROUTE_ENTRY_BYTES; o++) begin
          if (32'(cfg_addr_i) == 32'(e * ROUTE_ENTRY_BYTES + o)) begin
            if (o < 4)       tbl[e].net[31-8*o -: 8]          <= cfg_data_i;
            else if (o < 8)  tbl[e].mask[31-8*(o-4) -: 8]     <= cfg_data_i;
            else if (o < 12) tbl[e].nexthop[31-8*(o-8) -: 8]  <= cfg_data_i;
            else             tbl[e].port                      <= cfg_data_i[3:0];
          end
        end
      end
    end
  end

  // Parallel compare, lowest index first.
  always_comb begin
    hit_o     = 1'b0;
    nh_live   = '0;
    port_live = '0;
    for (int e = N_ROUTES - 1; e >= 0; e--) begin
      if ((dst_i & tbl[e].mask) == (tbl[e].net & tbl[e].mask)) begin
        hit_o     = 1'b1;
        nh_live   = tbl[e].nexthop;
        port_live = tbl[e].port;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nh_q <= '0;
    end else if (proc_i) begin
      nh_q <= nh_live;
    end
  end

  // CBUS multiplexer.
  always_comb begin
    cbus_o = '0;
    if (proc_i)                              cbus_o = port_live;
    else if (idx_i >= 16'd1 && idx_i <= 16'd8) cbus_o = nh_q[31 - 4*(32'(idx_i) - 1) -: 4];
  end

endmodule
