// ip_router: the IP router datapath of the router stream module.
//
// Packet octets stream through a 20-octet shift register, one per clock
// while en_i is high. Around it:
//  * CNT16 counts the octets of the current packet as they enter;
//  * VER/IHL checks the version and stores the header length at Pkt_start;
//  * when octet 0 reaches the last stage and CNT16 reads 20, the header is
//    complete (octet k in stage 19-k) and the control logic raises PROC_PKT;
//  * in that cycle FILTER examines the source address (stages 7..4),
//    DEC_TTL decrements the TTL (stage 11) and writes it back as it moves
//    into stage 12, PKT_LEN loads the total length (stages 17..16), and
//    RTE_LU looks up the destination (stages 3..0);
//  * the control logic gives INVALID_PKT for every octet of the packet, and
//    RTE_LU puts the output port and nexthop on CBUS as the packet leaves.
// Programming words that the interface controller passes on travel through
// the register untouched. Block structure follows the prototype's router block diagram;
// field positions are those of IPv4; the check set and CBUS order are this
// design's choices (see router_ctrl and rte_lu).
// Timing: latency 20 clocks of en_i, one octet per clock.
module ip_router
  import stream_pkg::*;
#(
  parameter int                    DEPTH   = HDR_BYTES,
  parameter route_t [N_ROUTES-1:0] ROUTES_INIT = DEFAULT_ROUTES,
  parameter int                    CFG_AW  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  stream_t           in_i,
  input  logic              cfg_we_i,
  input  logic [CFG_AW-1:0] cfg_addr_i,
  input  logic [7:0]        cfg_data_i,
  output stream_t           out_o,
  output logic              invalid_pkt_o,
  output logic              proc_pkt_o,
  output chk_t              chk_o
);

  localparam int TTL_OFS = 8, LEN_OFS = 2, SRC_OFS = 12, DST_OFS = 16;

  sr_word_t    din, st [DEPTH];
  logic [15:0] count, hdr_bytes, idx;
  logic        ver_ok, past_end, src_drop, ttl_expired, route_hit;
  logic [3:0]  cbus;
  logic [7:0]  ttl_dec;
  logic [15:0] total_len;
  logic [31:0] src, dst;
  logic        start_in;

  assign start_in = in_i.valid && in_i.pkt_start;
  assign din      = '{pkt_start: start_in, prgm: in_i.prgm, valid: in_i.valid, data: in_i.data};

  hdr_shift_reg #(.DEPTH(DEPTH), .MOD_STAGE(DEPTH - 1 - TTL_OFS + 1)) u_sr (
    .clk, .rst_n, .en_i,
    .din_i      (din),
    .mod_en_i   (proc_pkt_o),
    .mod_data_i (ttl_dec),
    .stage_o    (st)
  );

  cnt16 u_cnt (
    .clk, .rst_n, .en_i,
    .start_i (start_in),
    .inc_i   (in_i.valid),
    .count_o (count)
  );

  ver_ihl u_ver (
    .clk, .rst_n, .en_i,
    .start_i     (start_in),
    .octet_i     (in_i.data),
    .ver_ok_o    (ver_ok),
    .hdr_bytes_o (hdr_bytes)
  );

  // Header fields, valid while octet 0 is in the last stage.
  assign total_len = {st[DEPTH-1-LEN_OFS].data, st[DEPTH-2-LEN_OFS].data};
  assign src = {st[DEPTH-1-SRC_OFS].data, st[DEPTH-2-SRC_OFS].data,
                st[DEPTH-3-SRC_OFS].data, st[DEPTH-4-SRC_OFS].data};
  assign dst = {st[DEPTH-1-DST_OFS].data, st[DEPTH-2-DST_OFS].data,
                st[DEPTH-3-DST_OFS].data, st[DEPTH-4-DST_OFS].data};

  src_filter u_filter (.src_i(src), .drop_o(src_drop));

  dec_ttl u_ttl (
    .ttl_i     (st[DEPTH-1-TTL_OFS].data),
    .ttl_o     (ttl_dec),
    .expired_o (ttl_expired)
  );

  pkt_len u_len (
    .clk, .rst_n, .en_i,
    .load_i     (proc_pkt_o),
    .len_i      (total_len),
    .step_i     (st[DEPTH-1].valid),
    .idx_o      (idx),
    .past_end_o (past_end)
  );

  rte_lu #(.ROUTES_INIT(ROUTES_INIT), .CFG_AW(CFG_AW)) u_rte (
    .clk, .rst_n,
    .cfg_we_i, .cfg_addr_i, .cfg_data_i,
    .dst_i  (dst),
    .proc_i (proc_pkt_o && en_i),
    .hit_o  (route_hit),
    .idx_i  (idx),
    .cbus_o (cbus)
  );

  router_ctrl #(.HDR_LEN(DEPTH)) u_ctrl (
    .clk, .rst_n, .en_i,
    .out_word_i    (st[DEPTH-1]),
    .count_i       (count),
    .ver_ok_i      (ver_ok),
    .hdr_bytes_i   (hdr_bytes),
    .total_len_i   (total_len),
    .past_end_i    (past_end),
    .src_drop_i    (src_drop),
    .ttl_expired_i (ttl_expired),
    .route_hit_i   (route_hit),
    .proc_pkt_o    (proc_pkt_o),
    .invalid_pkt_o (invalid_pkt_o),
    .chk_o         (chk_o)
  );

  assign out_o = '{pkt_start: st[DEPTH-1].pkt_start, prgm: st[DEPTH-1].prgm,
                   valid: st[DEPTH-1].valid, data: st[DEPTH-1].data,
                   cbus: st[DEPTH-1].valid ? cbus : 4'd0};

endmodule
