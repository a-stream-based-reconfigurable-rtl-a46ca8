// tb_stream_router_top: the whole prototype chain at its default
// parameters. The generator runs freely; the sink side applies random Rdy
// stalls. Twice during the run a new route table is requested (the second
// one leaves one destination without a route). The testbench watches the
// words entering the router, works out with the reference model which
// packets must be forwarded and how (TTL decremented, port and nexthop on
// CBUS, 20 transfer cycles later), and compares that with what reaches the
// sink. It counts each mechanism of the design - forwarding, net-10 source
// filtering, TTL expiry, missing route, reprogramming through the stream,
// Rdy stalls - and fails if one never happened.
`include "tb_check.svh"
module tb_stream_router_top;
  import stream_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_PKTS = 800;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, gen_en = 0, prgm_req = 0, sink_rdy = 0, proc_;
  route_t [N_ROUTES-1:0] ptbl;
  stream_t sink;
  logic [15:0] gen_pkts;
  chk_t chk;
  always #5 clk = ~clk;

  stream_router_top dut (.clk, .rst_n, .gen_enable_i(gen_en), .prgm_req_i(prgm_req), .prgm_table_i(ptbl),
                         .sink_o(sink), .sink_rdy_i(sink_rdy), .gen_pkts_o(gen_pkts),
                         .rtr_proc_o(proc_), .rtr_chk_o(chk));

  initial begin repeat (3000000) @(posedge clk); failures++; `TB_FINISH end

  route_t  tbl [N_ROUTES];
  octq_t   in_pkt, in_run;
  int      in_start, tcyc = 0;
  expect_t exp_q[$];
  int      exp_cyc[$];
  expect_t rx, rx_q[$];
  octq_t   rx_cbus;
  int      rx_cyc[$], rx_start;
  int      cur_i = -1;
  int n_fwd = 0, n_filt = 0, n_ttl = 0, n_noroute = 0, n_reprog = 0, n_stall = 0, n_octets = 0;

  // Reference: watch the words entering the router module.
  always @(posedge clk) if (rst_n && dut.rtr_rdy) begin
    automatic stream_t w = dut.gen2rtr;
    if (w.prgm) in_run.push_back(w.data);
    else if (in_run.size() > 0) begin
      if (in_run[0] == 8'h01 && in_run.size() == 1 + ROUTE_TABLE_BYTES) begin
        for (int e = 0; e < N_ROUTES; e++) begin
          automatic int b = 1 + e * ROUTE_ENTRY_BYTES;
          tbl[e].net     = {in_run[b], in_run[b+1], in_run[b+2], in_run[b+3]};
          tbl[e].mask    = {in_run[b+4], in_run[b+5], in_run[b+6], in_run[b+7]};
          tbl[e].nexthop = {in_run[b+8], in_run[b+9], in_run[b+10], in_run[b+11]};
          tbl[e].port    = in_run[b+12][3:0];
        end
      end
      in_run = {};
    end
    if (w.valid) begin
      if (w.pkt_start) in_start = tcyc;
      in_pkt.push_back(w.data);
    end else if (in_pkt.size() > 0) begin
      automatic expect_t r = route(in_pkt, tbl);
      if (r.fwd) begin exp_q.push_back(r); exp_cyc.push_back(in_start); end
      in_pkt = {};
    end
  end

  // Sink: compare what leaves the router.
  always @(posedge clk) if (rst_n) begin
    if (!sink_rdy) n_stall++;
    `CHECK(dut.rtr_rdy == sink_rdy, "router adds no stall of its own (one octet per clock)")
    if (sink_rdy) begin
      tcyc <= tcyc + 1;
      if (proc_) begin
        if (chk.src_filtered) n_filt++;
        if (chk.ttl_expired)  n_ttl++;
        if (chk.no_route)     n_noroute++;
        `CHECK(!chk.runt && !chk.hdr_bad, "generator headers pass verification")
      end
      `CHECK(!sink.prgm, "router consumes its own programming runs")
      if (sink.valid) begin
        if (sink.pkt_start) begin
          if (cur_i >= 0) begin rx_q.push_back(rx); rx_cyc.push_back(rx_start); end
          rx.octets = {}; rx.fwd = 1; rx.port = 0; rx.nexthop = 0;
          rx_cbus = {};
          rx_start = tcyc; cur_i = 0;
        end
        `CHECK(cur_i >= 0, "octet belongs to a packet")
        rx.octets.push_back(sink.data);
        if (cur_i == 0) rx.port = sink.cbus;
        else if (cur_i <= 8) rx.nexthop[31 - 4*(cur_i-1) -: 4] = sink.cbus;
        else `CHECK(sink.cbus == 0, "CBUS idle after octet 8")
        cur_i++; n_octets++;
      end
    end
  end

  // Pair up expected and received packets in order.
  task automatic compare_all();
    if (cur_i >= 0) begin rx_q.push_back(rx); rx_cyc.push_back(rx_start); cur_i = -1; end
    `CHECK(rx_q.size() == exp_q.size(), $sformatf("received %0d packets, expected %0d", rx_q.size(), exp_q.size()))
    while (rx_q.size() > 0 && exp_q.size() > 0) begin
      expect_t e = exp_q.pop_front(), g = rx_q.pop_front();
      int ce = exp_cyc.pop_front(), cg = rx_cyc.pop_front();
      `CHECK(g.octets == e.octets, $sformatf("packet %0d octets (TTL decremented)", n_fwd))
      `CHECK(g.port == e.port && g.nexthop == e.nexthop, $sformatf("packet %0d port/nexthop on CBUS", n_fwd))
      `CHECK(cg - ce == 20, $sformatf("packet %0d latency %0d", n_fwd, cg - ce))
      n_fwd++;
    end
  endtask

  task automatic request_table(route_t t [N_ROUTES]);
    for (int e = 0; e < N_ROUTES; e++) ptbl[e] = t[e];
    @(negedge clk); prgm_req = 1; @(negedge clk); prgm_req = 0;
    wait (dut.u_router.u_sic.state == dut.u_router.u_sic.S_CFG);
    wait (dut.u_router.u_sic.state != dut.u_router.u_sic.S_CFG);
    n_reprog++;
  endtask

  initial begin
    route_t t [N_ROUTES];
    int t0;
    default_table(tbl);
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    gen_en <= 1;
    fork
      forever begin @(negedge clk); sink_rdy = $urandom_range(0, 7) != 0; end
      begin
        wait (gen_pkts == 100);
        default_table(t);
        for (int e = 0; e < N_ROUTES; e++) begin t[e].port = 4'(e + 8); t[e].nexthop = $urandom; end
        request_table(t);
        wait (gen_pkts == 400);
        t[1].net = 32'h0B00_0000;   // 192.168.20/24 loses its route
        request_table(t);
        wait (gen_pkts == N_PKTS);
      end
    join_any
    gen_en <= 0;
    t0 = tcyc;
    wait (tcyc > t0 + 1200);
    compare_all();
    $display("forwarded %0d octets %0d filtered %0d ttl %0d noroute %0d reprog %0d stalls %0d",
             n_fwd, n_octets, n_filt, n_ttl, n_noroute, n_reprog, n_stall);
    `CHECK(n_fwd > 0,     "forwarding happened")
    `CHECK(n_filt > 0,    "net-10 filtering happened")
    `CHECK(n_ttl > 0,     "TTL expiry happened")
    `CHECK(n_noroute > 0, "missing route happened")
    `CHECK(n_reprog == 2, "two reprogramming runs")
    `CHECK(n_stall > 0,   "Rdy stalls happened")
    `TB_FINISH
  end
endmodule
