// tb_packet_generator: collects the generator's output under random Rdy
// stalls and checks every packet against an independent model of the
// per-packet LFSR: version/IHL, total length equal to the octets sent and
// within 21..1024, identification, TTL, protocol, zero checksum, source and
// destination from the four-address sets, and at least one idle slot
// between packets. A requested programming run must appear between packets
// with the router ID and the table octets.
`include "tb_check.svh"
module tb_packet_generator;
  import stream_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, prgm_req = 0, rdy = 0;
  route_t [N_ROUTES-1:0] ptbl;
  stream_t w;
  logic [15:0] cnt;
  always #5 clk = ~clk;

  localparam logic [3:0][31:0] SRC = {32'h800A_0204, 32'hAC10_0009, 32'hC0A8_0101, 32'h0A01_0203};
  localparam logic [3:0][31:0] DST = {32'h80AD_2804, 32'hAC1F_0303, 32'hC0A8_1402, 32'hC0A8_0A01};

  packet_generator u_dut (.clk, .rst_n, .enable_i(enable), .prgm_req_i(prgm_req), .prgm_table_i(ptbl),
                          .dn_o(w), .dn_rdy_i(rdy), .pkt_count_o(cnt));

  initial begin repeat (2000000) @(posedge clk); failures++; `TB_FINISH end

  logic [31:0] r = 32'h1234_5679;   // model of the per-packet LFSR
  octq_t pkt, run, exp_run;
  int n_pkts = 0, n_runs = 0, idle_since = 100, min_len = 9999, max_len = 0;
  bit in_run = 0;
  bit src_seen [4], dst_seen [4];

  function automatic logic [31:0] step(logic [31:0] s);
    return (s >> 1) ^ (s[0] ? 32'h8020_0003 : 32'h0);
  endfunction

  task automatic check_pkt(octq_t q, int id);
    int L = r[21:12] + 1;
    if (L < 21) L += 20;
    `CHECK(q.size() == L, $sformatf("packet %0d length %0d vs model %0d", id, q.size(), L))
    `CHECK(q[0] == 8'h45 && q[1] == 0, "version/IHL and TOS")
    `CHECK({q[2], q[3]} == 16'(q.size()), "total length field")
    `CHECK({q[4], q[5]} == 16'(id), "identification")
    `CHECK(q[6] == 0 && q[7] == 0 && q[10] == 0 && q[11] == 0, "flags, fragment, checksum zero")
    `CHECK(q[8] == r[11:4] && q[9] == 17, "TTL and protocol")
    `CHECK({q[12], q[13], q[14], q[15]} == SRC[r[1:0]], "source address")
    `CHECK({q[16], q[17], q[18], q[19]} == DST[r[3:2]], "destination address")
    `CHECK(q.size() >= 21 && q.size() <= 1024, "length in 21..1024")
    src_seen[r[1:0]] = 1; dst_seen[r[3:2]] = 1;
    if (q.size() < min_len) min_len = q.size();
    if (q.size() > max_len) max_len = q.size();
    r = step(r);
  endtask

  always @(posedge clk) if (rst_n && rdy) begin
    `CHECK(!(w.valid && w.prgm), "never Prgm and Valid together")
    if (w.prgm) begin
      if (!in_run) `CHECK(pkt.size() == 0, "run only between packets")
      in_run = 1; run.push_back(w.data);
    end else if (in_run) begin
      `CHECK(run == exp_run, "programming run content")
      in_run = 0; run = {}; n_runs++;
    end
    if (w.valid) begin
      if (w.pkt_start) begin
        `CHECK(pkt.size() == 0, "packet starts after the previous ended")
        `CHECK(idle_since > 0, "idle slot between packets")
      end else `CHECK(pkt.size() > 0, "octet without Pkt_start opens no packet")
      pkt.push_back(w.data);
      idle_since = 0;
    end else begin
      if (pkt.size() > 0) begin check_pkt(pkt, n_pkts); n_pkts++; pkt = {}; end
      idle_since++;
    end
  end

  initial begin
    route_t t [N_ROUTES];
    for (int e = 0; e < N_ROUTES; e++) begin
      ptbl[e] = '{net: $urandom, mask: $urandom, nexthop: $urandom, port: 4'($urandom)};
      t[e] = ptbl[e];
    end
    exp_run = prgm_run(8'h01, t);
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    enable <= 1;
    fork
      forever begin @(negedge clk); rdy = $urandom_range(0, 5) != 0; end
      begin
        wait (n_pkts == 20);
        @(negedge clk); prgm_req = 1; @(negedge clk); prgm_req = 0;
        wait (n_pkts == 300);
      end
    join_any
    enable <= 0;
    repeat (3000) @(posedge clk);
    `CHECK(cnt == 16'(n_pkts), $sformatf("packet count %0d vs %0d", cnt, n_pkts))
    `CHECK(n_runs == 1, "one programming run")
    `CHECK(min_len < 60 && max_len > 900, $sformatf("length spread %0d..%0d", min_len, max_len))
    for (int i = 0; i < 4; i++) `CHECK(src_seen[i] && dst_seen[i], "all addresses used")
    `TB_FINISH
  end
endmodule
