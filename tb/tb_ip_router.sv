// tb_ip_router: streams a mix of good and faulty IPv4 packets (bad version,
// short total length, TTL 0/1, net-10 source, unroutable destination, runts,
// trailing octets beyond the total length) and pass-through programming
// words into the router datapath with random stalls. Every packet the
// reference model forwards must come out, in order, with the decremented
// TTL, the right CBUS nibbles and a latency of exactly 20 enabled clocks;
// nothing else may come out Valid.
`include "tb_check.svh"
module tb_ip_router;
  import stream_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  stream_t in_w = '0, out_w;
  logic inv, proc_;
  chk_t chk;
  route_t tbl [N_ROUTES];
  always #5 clk = ~clk;

  ip_router u_dut (.clk, .rst_n, .en_i(en), .in_i(in_w), .cfg_we_i(1'b0), .cfg_addr_i('0), .cfg_data_i('0),
                   .out_o(out_w), .invalid_pkt_o(inv), .proc_pkt_o(proc_), .chk_o(chk));

  stream_t   words[$];          // words to send
  int        start_cyc[$];      // send cycle of each forwarded packet's first octet
  expect_t   exp_q[$];
  byte unsigned prg_sent[$];
  int        ecyc = 0;          // enabled-cycle counter
  int        n_rx = 0, n_prg = 0, n_drop_kind[5] = '{0, 0, 0, 0, 0};
  expect_t   cur;
  int        cur_i = -1;

  initial begin repeat (400000) @(posedge clk); failures++; `TB_FINISH end

  function automatic void add_pkt(octq_t q);
    expect_t r = route(q, tbl);
    if (r.fwd) begin exp_q.push_back(r); start_cyc.push_back(-1 - words.size()); end
    foreach (q[i]) words.push_back('{pkt_start: i == 0, prgm: 0, valid: 1, data: q[i], cbus: 4'($urandom)});
  endfunction

  // Sender and receiver run on the same edge; the receiver looks at the
  // word leaving the last stage in an enabled cycle.
  int sent = 0;
  always @(posedge clk) if (rst_n && en) begin
    ecyc <= ecyc + 1;
    if (out_w.prgm) begin
      `CHECK(prg_sent.size() > 0 && out_w.data == prg_sent[0], "programming word passed through")
      if (prg_sent.size() > 0) void'(prg_sent.pop_front());
      n_prg++;
    end
    if (out_w.valid && !inv) begin
      if (out_w.pkt_start) begin
        `CHECK(exp_q.size() > 0, "forwarded packet was expected")
        if (cur_i >= 0) `CHECK(cur_i == cur.octets.size(), $sformatf("previous packet length %0d vs %0d", cur_i, cur.octets.size()))
        cur = exp_q.pop_front();
        `CHECK(ecyc - start_cyc.pop_front() == 20, "latency 20 clocks")
        cur_i = 0; n_rx++;
      end
      `CHECK(cur_i >= 0 && cur_i < cur.octets.size(), "octet inside expected packet")
      if (cur_i >= 0 && cur_i < cur.octets.size()) begin
        `CHECK(out_w.data == cur.octets[cur_i], $sformatf("octet %0d: %h vs %h", cur_i, out_w.data, cur.octets[cur_i]))
        `CHECK(out_w.cbus == cbus_at(cur, cur_i), $sformatf("cbus at octet %0d", cur_i))
      end
      cur_i++;
    end
    if (proc_) for (int b = 0; b < 5; b++) if (chk[b]) n_drop_kind[b]++;
    if (chk.runt) n_drop_kind[4]++;
  end

  initial begin
    default_table(tbl);
    for (int p = 0; p < 300; p++) begin
      automatic int kind = $urandom_range(0, 9);
      automatic int len = $urandom_range(21, 120);
      automatic int tl = len;
      automatic byte unsigned vi = 8'h45, ttl = 8'($urandom_range(2, 255));
      automatic logic [31:0] src = 32'hC0A8_0101, dst = tbl[$urandom_range(0, 3)].net | 32'h5;
      case (kind)
        1: vi = $urandom_range(0, 1) ? 8'h65 : 8'h46;
        2: tl = $urandom_range(0, 19);
        3: ttl = 8'($urandom_range(0, 1));
        4: src = 32'h0A00_0000 | 32'($urandom_range(0, 65535));
        5: dst = 32'h0102_0304;
        6: len = $urandom_range(1, 19);
        7: tl = len - $urandom_range(1, 5);
        default: ;
      endcase
      add_pkt(make_pkt(len, tl, vi, ttl, src, dst));
      // fix up start cycles to word positions
      if (start_cyc.size() > 0 && start_cyc[$] < 0) start_cyc[$] = -start_cyc[$] - 1;
      for (int g = 0; g < $urandom_range(0, 3); g++) words.push_back('0);
      if (p % 37 == 5) for (int g = 0; g < 4; g++) begin
        words.push_back('{pkt_start: 0, prgm: 1, valid: 0, data: 8'(p + g), cbus: 0});
        prg_sent.push_back(8'(p + g));
      end
    end
    for (int g = 0; g < 40; g++) words.push_back('0);
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    // start_cyc holds word positions; enabled cycles count words one to one
    while (words.size() > 0) begin
      @(negedge clk);
      en = $urandom_range(0, 7) != 0;
      in_w = words[0];
      @(posedge clk);
      if (en) void'(words.pop_front());
    end
    @(negedge clk); en = 0;
    `CHECK(exp_q.size() == 0, $sformatf("%0d expected packets never came out", exp_q.size()))
    `CHECK(n_rx > 100, $sformatf("forwarded %0d packets", n_rx))
    `CHECK(n_prg > 0 && prg_sent.size() == 0, "programming words all passed")
    for (int b = 0; b < 5; b++) `CHECK(n_drop_kind[b] > 0, $sformatf("drop kind %0d seen", b))
    `TB_FINISH
  end
endmodule
