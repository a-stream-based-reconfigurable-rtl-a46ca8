// tb_ref_pkg: reference model shared by the router testbenches.
// Builds IPv4 packets as octet queues and works out, independently of the
// RTL, what the router must do with each one: drop it, or forward it with
// the TTL decremented, trimmed to its total length, and with the output
// port and nexthop that a four-entry first-match route table gives.
package tb_ref_pkg;
  import stream_pkg::*;

  typedef byte unsigned octq_t[$];

  // Expected result of routing one packet.
  typedef struct {
    bit          fwd;
    octq_t       octets;
    logic [3:0]  port;
    logic [31:0] nexthop;
  } expect_t;

  function automatic octq_t make_pkt(int len, int total_len, byte unsigned ver_ihl,
                                     byte unsigned ttl, logic [31:0] src, logic [31:0] dst);
    octq_t q;
    for (int i = 0; i < len; i++) begin
      byte unsigned b;
      case (i)
        0: b = ver_ihl;
        2: b = total_len[15:8];
        3: b = total_len[7:0];
        8: b = ttl;
        9: b = 17;
        12: b = src[31:24]; 13: b = src[23:16]; 14: b = src[15:8]; 15: b = src[7:0];
        16: b = dst[31:24]; 17: b = dst[23:16]; 18: b = dst[15:8]; 19: b = dst[7:0];
        default: b = (i < 20) ? 0 : byte'($urandom);
      endcase
      q.push_back(b);
    end
    return q;
  endfunction

  function automatic expect_t route(octq_t q, route_t tbl [N_ROUTES]);
    expect_t r;
    int total, n;
    logic [31:0] src, dst;
    bit hit = 0;
    r.fwd = 0; r.port = 0; r.nexthop = 0;
    if (q.size() < 20) return r;
    total = {q[2], q[3]};
    src = {q[12], q[13], q[14], q[15]};
    dst = {q[16], q[17], q[18], q[19]};
    for (int e = 0; e < N_ROUTES && !hit; e++)
      if (((dst ^ tbl[e].net) & tbl[e].mask) == 0) begin
        hit = 1; r.port = tbl[e].port; r.nexthop = tbl[e].nexthop;
      end
    r.fwd = q[0] == 8'h45 && total >= 20 && q[8] > 1 && src[31:24] != 10 && hit;
    n = (total < q.size()) ? total : q.size();
    for (int i = 0; i < n; i++) r.octets.push_back(i == 8 ? byte'(q[8] - 1) : q[i]);
    return r;
  endfunction

  // CBUS nibble expected alongside outgoing octet i.
  function automatic logic [3:0] cbus_at(expect_t r, int i);
    if (i == 0) return r.port;
    if (i <= 8) return r.nexthop[31 - 4*(i-1) -: 4];
    return 4'd0;
  endfunction

  // Octets of a programming run for a module: ID then the table entries.
  function automatic octq_t prgm_run(byte unsigned id, route_t tbl [N_ROUTES]);
    octq_t q;
    q.push_back(id);
    for (int e = 0; e < N_ROUTES; e++) begin
      for (int k = 0; k < 4; k++) q.push_back(tbl[e].net[31-8*k -: 8]);
      for (int k = 0; k < 4; k++) q.push_back(tbl[e].mask[31-8*k -: 8]);
      for (int k = 0; k < 4; k++) q.push_back(tbl[e].nexthop[31-8*k -: 8]);
      q.push_back({4'd0, tbl[e].port});
    end
    return q;
  endfunction

  function automatic void default_table(output route_t tbl [N_ROUTES]);
    for (int e = 0; e < N_ROUTES; e++) tbl[e] = DEFAULT_ROUTES[e];
  endfunction

endpackage
