// router_ctrl: the router's control logic.
//
// Watches the octet leaving the header shift register. When it is the first
// octet of a packet and the octet counter shows that exactly HDR_LEN
// octets of that packet have entered, the whole header is in the register:
// PROC_PKT is raised for that one cycle, which tells PKT_LEN, DEC_TTL and
// RTE_LU to act, and the check results are combined into the packet's
// verdict. INVALID_PKT is then high for every octet of a rejected packet and
// for octets beyond the packet's total length; the stream interface
// controller turns it into the outgoing Valid, so rejected packets are
// dropped at the end of the pipeline as the prototype does.
// A packet whose first octet reaches the output while the counter differs
// from HDR_LEN is shorter than a header (runt) and is rejected.
// Checks (this design's reading of "header verification checks"): version
// 4, IHL 5 (options unsupported), total length >= 20, TTL > 1, source not in
// the filtered net, a route found.
// Timing: proc_pkt_o, invalid_pkt_o and chk_o are combinational for the
// octet leaving in this cycle; the verdict is held for the rest of the
// packet in a register.
module router_ctrl
  import stream_pkg::*;
#(
  parameter int HDR_LEN = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  sr_word_t    out_word_i,
  input  logic [15:0] count_i,
  input  logic        ver_ok_i,
  input  logic [15:0] hdr_bytes_i,   // IHL*4 from VER/IHL
  input  logic [15:0] total_len_i,
  input  logic        past_end_i,
  input  logic        src_drop_i,
  input  logic        ttl_expired_i,
  input  logic        route_hit_i,
  output logic        proc_pkt_o,
  output logic        invalid_pkt_o,
  output chk_t        chk_o
);

  logic first, bad_now, invalid_q;

  assign first      = out_word_i.valid && out_word_i.pkt_start;
  assign proc_pkt_o = first && (count_i == 16'(HDR_LEN));

  always_comb begin
    chk_o = '0;
    if (first && !proc_pkt_o) begin
      chk_o.runt = 1'b1;
    end else if (proc_pkt_o) begin
      chk_o.hdr_bad      = !ver_ok_i || (hdr_bytes_i != 16'(HDR_LEN)) ||
                           (total_len_i < 16'(HDR_LEN));
      chk_o.ttl_expired  = ttl_expired_i;
      chk_o.src_filtered = src_drop_i;
      chk_o.no_route     = !route_hit_i;
    end
  end

  assign bad_now = |chk_o;

  always_ff @(posedge clk) begin
    if (!rst_n)              invalid_q <= 1'b1;
    else if (en_i && first)  invalid_q <= bad_now;
  end

  assign invalid_pkt_o = first ? bad_now : (invalid_q || past_end_i);

endmodule
