// packet_generator: the packet source stream module.
//
// Emits a stream of IPv4 packets with valid 20-octet headers (no options,
// checksum field 0) followed by a pseudo-random payload, one octet per
// clock while Rdy is high. Per packet a 32-bit LFSR picks
//   source      : one of four SRC_ADDR         (bits 1:0)
//   destination : one of four DST_ADDR         (bits 3:2)
//   TTL         : 8 pseudo-random bits         (bits 11:4)
//   length      : MIN_LEN..MAX_LEN octets      (bits 21:12, see below)
//   gap         : 1..4 idle slots afterwards   (bits 23:22)
// The 10-bit length field r gives r+1 (1..1024); values below MIN_LEN are
// raised by MIN_LEN-1, so every length from 21 to 1024 occurs. Other header
// fields: version/IHL 0x45, TOS 0, identification = packet count, flags and
// fragment offset 0, protocol 17. Payload octets come from a 16-bit LFSR.
// On a pulse of prgm_req_i it latches prgm_table_i and, before the next
// packet, emits a programming run for the router: ROUTER_ID, then the four
// route entries as laid out in rte_lu (net, mask, nexthop, port; MSB first).
// Four addresses of each kind, variable TTL, lengths 21..1024 and LFSRs
// follow the prototype; the address values, field slicing, gaps and the
// programming run are this design's.
// Interface: dn_o is combinational from registers; the generator advances
// on every clock with dn_rdy_i high. pkt_count_o counts packets started.
module packet_generator
  import stream_pkg::*;
#(
  parameter int                MIN_LEN   = 21,
  parameter int                MAX_LEN   = 1024,
  parameter logic [3:0][31:0]  SRC_ADDR  = {32'h800A_0204, 32'hAC10_0009, 32'hC0A8_0101, 32'h0A01_0203},
  parameter logic [3:0][31:0]  DST_ADDR  = {32'h80AD_2804, 32'hAC1F_0303, 32'hC0A8_1402, 32'hC0A8_0A01},
  parameter logic [7:0]        ROUTER_ID = 8'h01,
  parameter logic [31:0]       SEED      = 32'h1234_5679
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable_i,
  input  logic                     prgm_req_i,
  input  route_t [N_ROUTES-1:0]    prgm_table_i,
  output stream_t                  dn_o,
  input  logic                     dn_rdy_i,
  output logic [15:0]              pkt_count_o
);

  typedef enum logic [1:0] {S_IDLE, S_PRG, S_PKT, S_GAP} state_e;

  localparam logic [7:0] VER_IHL  = 8'h45;
  localparam logic [7:0] PROTO    = 8'd17;

  state_e                state;
  logic [15:0]           idx;        // octet index within packet or run
  logic [2:0]            ent;        // route entry being sent
  logic [3:0]            ofs;        // octet within the entry
  logic [2:0]            gap;
  logic                  prgm_pend;
  route_t [N_ROUTES-1:0] tbl_q;
  logic [31:0]           src_q, dst_q, r32;
  logic [15:0]           len_q, ident_q, r16, len_new;
  logic [7:0]            ttl_q, hdr_octet, tbl_octet;
  logic                  start_pkt, step_pay;

  // ---- pseudo-random sources -------------------------------------------
  assign start_pkt = dn_rdy_i && state == S_IDLE && !prgm_pend && enable_i;
  assign step_pay  = dn_rdy_i && state == S_PKT && idx >= 16'(HDR_BYTES);

  lfsr #(.WIDTH(32), .TAPS(32'h8020_0003), .SEED(SEED)) u_lfsr_pkt (
    .clk, .rst_n, .en_i(start_pkt), .state_o(r32));

  lfsr #(.WIDTH(16), .TAPS(16'hB400), .SEED(16'hACE1)) u_lfsr_pay (
    .clk, .rst_n, .en_i(step_pay), .state_o(r16));

  always_comb begin
    len_new = 16'(r32[21:12]) + 16'd1;
    if (len_new < 16'(MIN_LEN)) len_new = len_new + 16'(MIN_LEN - 1);
    if (len_new > 16'(MAX_LEN)) len_new = 16'(MAX_LEN);
  end

  // ---- sequencing -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      idx         <= '0;
      ent         <= '0;
      ofs         <= '0;
      gap         <= '0;
      prgm_pend   <= 1'b0;
      tbl_q       <= '0;
      src_q       <= '0;
      dst_q       <= '0;
      len_q       <= '0;
      ttl_q       <= '0;
      ident_q     <= '0;
      pkt_count_o <= '0;
    end else begin
      if (prgm_req_i) begin
        prgm_pend <= 1'b1;
        tbl_q     <= prgm_table_i;
      end
      if (dn_rdy_i) begin
        unique case (state)
          S_IDLE: begin
            idx <= '0;
            ent <= '0;
            ofs <= '0;
            if (prgm_pend && !prgm_req_i) begin
              state     <= S_PRG;
              prgm_pend <= 1'b0;
            end else if (start_pkt) begin
              state       <= S_PKT;
              src_q       <= SRC_ADDR[r32[1:0]];
              dst_q       <= DST_ADDR[r32[3:2]];
              ttl_q       <= r32[11:4];
              len_q       <= len_new;
              gap         <= {1'b0, r32[23:22]};
              ident_q     <= pkt_count_o;
              pkt_count_o <= pkt_count_o + 16'd1;
            end
          end
          S_PRG: begin
            idx <= idx + 16'd1;
            if (idx != 0) begin
              if (ofs == 4'(ROUTE_ENTRY_BYTES - 1)) begin
                ofs <= '0;
                ent <= ent + 3'd1;
              end else begin
                ofs <= ofs + 4'd1;
              end
            end
            if (idx == 16'(ROUTE_TABLE_BYTES)) state <= S_IDLE;
          end
          S_PKT: begin
            idx <= idx + 16'd1;
            if (idx == len_q - 16'd1) state <= S_GAP;
          end
          S_GAP: begin
            if (gap == 0) state <= S_IDLE;
            else          gap   <= gap - 3'd1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // ---- octet selection --------------------------------------------------
  always_comb begin
    unique case (idx)
      16'd0:  hdr_octet = VER_IHL;
      16'd2:  hdr_octet = len_q[15:8];
      16'd3:  hdr_octet = len_q[7:0];
      16'd4:  hdr_octet = ident_q[15:8];
      16'd5:  hdr_octet = ident_q[7:0];
      16'd8:  hdr_octet = ttl_q;
      16'd9:  hdr_octet = PROTO;
      16'd12: hdr_octet = src_q[31:24];
      16'd13: hdr_octet = src_q[23:16];
      16'd14: hdr_octet = src_q[15:8];
      16'd15: hdr_octet = src_q[7:0];
      16'd16: hdr_octet = dst_q[31:24];
      16'd17: hdr_octet = dst_q[23:16];
      16'd18: hdr_octet = dst_q[15:8];
      16'd19: hdr_octet = dst_q[7:0];
      default: hdr_octet = (idx >= 16'(HDR_BYTES)) ? r16[7:0] : 8'd0;
    endcase
  end

  always_comb begin
    route_t e;
    e = tbl_q[ent[1:0]];
    unique case (ofs)
      4'd0:  tbl_octet = e.net[31:24];
      4'd1:  tbl_octet = e.net[23:16];
      4'd2:  tbl_octet = e.net[15:8];
      4'd3:  tbl_octet = e.net[7:0];
      4'd4:  tbl_octet = e.mask[31:24];
      4'd5:  tbl_octet = e.mask[23:16];
      4'd6:  tbl_octet = e.mask[15:8];
      4'd7:  tbl_octet = e.mask[7:0];
      4'd8:  tbl_octet = e.nexthop[31:24];
      4'd9:  tbl_octet = e.nexthop[23:16];
      4'd10: tbl_octet = e.nexthop[15:8];
      4'd11: tbl_octet = e.nexthop[7:0];
      default: tbl_octet = {4'd0, e.port};
    endcase
  end

  always_comb begin
    dn_o = '0;
    if (state == S_PRG) begin
      dn_o.prgm = 1'b1;
      dn_o.data = (idx == 0) ? ROUTER_ID : tbl_octet;
    end else if (state == S_PKT) begin
      dn_o.valid     = 1'b1;
      dn_o.pkt_start = (idx == 0);
      dn_o.data      = hdr_octet;
    end
  end

endmodule
