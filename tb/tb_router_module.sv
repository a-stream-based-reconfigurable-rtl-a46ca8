// tb_router_module: the router stream module end to end at its stream
// ports. Packets of all kinds, programming runs for this module (which must
// rewrite the route table and vanish from the stream) and for another
// module (which must pass through), and random Rdy stalls from downstream.
// Forwarded packets are checked octet by octet with CBUS and a latency of
// 20 transfer cycles; the table change must take effect from the first
// packet after the run.
`include "tb_check.svh"
module tb_router_module;
  import stream_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, dn_rdy = 0, up_rdy, proc_;
  stream_t up = '0, dn;
  chk_t chk;
  route_t tbl [N_ROUTES];
  always #5 clk = ~clk;

  router_module u_dut (.clk, .rst_n, .up_i(up), .up_rdy_o(up_rdy), .dn_o(dn), .dn_rdy_i(dn_rdy),
                       .proc_pkt_o(proc_), .chk_o(chk));

  stream_t      words[$];
  int           start_cyc[$];
  expect_t      exp_q[$];
  byte unsigned pass_q[$];
  int           ecyc = 0, n_rx = 0, n_pass = 0, n_noroute = 0, n_reprog = 0, n_stall = 0;
  expect_t      cur;
  int           cur_i = -1;

  initial begin repeat (400000) @(posedge clk); failures++; `TB_FINISH end

  always @(posedge clk) if (rst_n) begin
    if (!dn_rdy) n_stall++;
    `CHECK(up_rdy == dn_rdy, "Rdy passed upstream")
    if (dn_rdy) begin
      ecyc <= ecyc + 1;
      if (dn.prgm) begin
        `CHECK(pass_q.size() > 0 && dn.data == pass_q[0], "foreign programming run passed")
        if (pass_q.size() > 0) void'(pass_q.pop_front());
        n_pass++;
      end
      if (dn.valid) begin
        if (dn.pkt_start) begin
          `CHECK(exp_q.size() > 0, "forwarded packet was expected")
          if (cur_i >= 0) `CHECK(cur_i == cur.octets.size(), "previous packet complete")
          cur = exp_q.pop_front();
          `CHECK(ecyc - start_cyc.pop_front() == 20, "latency 20 transfer cycles")
          cur_i = 0; n_rx++;
        end
        if (cur_i >= 0 && cur_i < cur.octets.size()) begin
          `CHECK(dn.data == cur.octets[cur_i], $sformatf("octet %0d", cur_i))
          `CHECK(dn.cbus == cbus_at(cur, cur_i), $sformatf("cbus at octet %0d", cur_i))
        end else `CHECK(0, "octet outside expected packet")
        cur_i++;
      end
      if (proc_ && chk.no_route) n_noroute++;
    end
  end

  initial begin
    route_t alt [N_ROUTES];
    default_table(tbl);
    for (int p = 0; p < 200; p++) begin
      automatic int len = $urandom_range(21, 90);
      automatic byte unsigned ttl = 8'($urandom_range(0, 40));
      automatic logic [31:0] src = ($urandom_range(0, 4) == 0) ? 32'h0A05_0505 : 32'hC0A8_0101;
      automatic logic [31:0] dst = DEFAULT_ROUTES[$urandom_range(0, 3)].net | 32'h9;
      automatic octq_t q = make_pkt(len, len, 8'h45, ttl, src, dst);
      automatic expect_t r = route(q, tbl);
      if (r.fwd) begin exp_q.push_back(r); start_cyc.push_back(words.size()); end
      foreach (q[i]) words.push_back('{pkt_start: i == 0, prgm: 0, valid: 1, data: q[i], cbus: 0});
      for (int g = 0; g < $urandom_range(0, 2); g++) words.push_back('0);
      if (p % 50 == 25) begin
        // new table for this module: swap ports, drop one destination
        octq_t run;
        alt = tbl;
        for (int e = 0; e < N_ROUTES; e++) begin alt[e].port = 4'($urandom); alt[e].nexthop = $urandom; end
        alt[$urandom_range(0, 3)].net = 32'h0100_0000;   // that destination becomes unroutable
        run = prgm_run(8'h01, alt);
        foreach (run[i]) words.push_back('{pkt_start: 0, prgm: 1, valid: 0, data: run[i], cbus: 0});
        words.push_back('0);
        tbl = alt; n_reprog++;
      end
      if (p % 50 == 40) begin
        for (int i = 0; i < 6; i++) begin
          automatic byte unsigned b = (i == 0) ? 8'h02 : 8'($urandom);
          words.push_back('{pkt_start: 0, prgm: 1, valid: 0, data: b, cbus: 0});
          pass_q.push_back(b);
        end
        words.push_back('0);
      end
    end
    for (int g = 0; g < 40; g++) words.push_back('0);
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    while (words.size() > 0) begin
      @(negedge clk);
      dn_rdy = $urandom_range(0, 5) != 0;
      up = words[0];
      @(posedge clk);
      if (dn_rdy) void'(words.pop_front());
    end
    @(negedge clk); dn_rdy = 0;
    `CHECK(exp_q.size() == 0, $sformatf("%0d expected packets missing", exp_q.size()))
    `CHECK(pass_q.size() == 0 && n_pass > 0, "foreign runs passed")
    `CHECK(n_rx > 50 && n_noroute > 0 && n_reprog > 0 && n_stall > 0, "mechanisms exercised")
    `TB_FINISH
  end
endmodule
