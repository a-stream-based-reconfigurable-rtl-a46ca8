// tb_router_ctrl: presents packets at the shift-register output with random
// check inputs, counter values and stalls, and checks PROC_PKT, the check
// vector and INVALID_PKT for the first and all following octets.
`include "tb_check.svh"
module tb_router_ctrl;
  import stream_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  sr_word_t w = '0;
  logic [15:0] count = 0, hb = 20, tl = 100;
  logic ver_ok = 1, past = 0, sdrop = 0, texp = 0, hit = 1;
  logic proc_, inv; chk_t chk;
  int n_fwd = 0, n_drop = 0;
  always #5 clk = ~clk;

  router_ctrl u_dut (.clk, .rst_n, .en_i(en), .out_word_i(w), .count_i(count), .ver_ok_i(ver_ok),
                     .hdr_bytes_i(hb), .total_len_i(tl), .past_end_i(past), .src_drop_i(sdrop),
                     .ttl_expired_i(texp), .route_hit_i(hit), .proc_pkt_o(proc_), .invalid_pkt_o(inv), .chk_o(chk));

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    @(negedge clk); w = '{pkt_start: 0, prgm: 0, valid: 1, data: 8'h11}; #1;
    `CHECK(inv, "octets before any packet are invalid")
    for (int p = 0; p < 400; p++) begin
      automatic bit runt = $urandom_range(0, 7) == 0;
      bit bad_hdr;
      bit verdict;
      @(negedge clk);
      en = 1;
      w = '{pkt_start: 1, prgm: 0, valid: 1, data: 8'h45};
      count  = runt ? 16'($urandom_range(1, 19)) : 16'd20;
      ver_ok = $urandom_range(0, 9) != 0;
      hb     = ($urandom_range(0, 9) != 0) ? 16'd20 : 16'(4 * $urandom_range(0, 15));
      tl     = ($urandom_range(0, 9) != 0) ? 16'($urandom_range(20, 1024)) : 16'($urandom_range(0, 19));
      sdrop  = $urandom_range(0, 5) == 0;
      texp   = $urandom_range(0, 5) == 0;
      hit    = $urandom_range(0, 5) != 0;
      past   = 0;
      #1;
      bad_hdr = !ver_ok || hb != 20 || tl < 20;
      verdict = runt || bad_hdr || sdrop || texp || !hit;
      `CHECK(proc_ == !runt, "PROC_PKT")
      `CHECK(chk.runt == runt, "runt flag")
      if (!runt) begin
        `CHECK(chk.hdr_bad == bad_hdr, "hdr_bad flag")
        `CHECK(chk.src_filtered == sdrop && chk.ttl_expired == texp && chk.no_route == !hit, "check flags")
      end
      `CHECK(inv == verdict, "INVALID_PKT on first octet")
      if (verdict) n_drop++; else n_fwd++;
      // a stall on the first octet must not lose the verdict
      if ($urandom_range(0, 3) == 0) begin
        en = 0; @(posedge clk); @(negedge clk); en = 1; #1;
        `CHECK(inv == verdict, "verdict held through stall")
      end
      for (int k = 0; k < $urandom_range(1, 10); k++) begin
        @(negedge clk);
        en = $urandom_range(0, 3) != 0;
        w = '{pkt_start: 0, prgm: 0, valid: 1, data: 8'($urandom)};
        sdrop = $urandom; texp = $urandom; hit = $urandom; ver_ok = $urandom;  // ignored now
        past = $urandom_range(0, 4) == 0;
        #1;
        `CHECK(!proc_, "no PROC_PKT inside a packet")
        `CHECK(inv == (verdict || past), $sformatf("INVALID_PKT inside packet %0d", p))
      end
    end
    `CHECK(n_fwd > 0 && n_drop > 0, "both verdicts seen")
    `TB_FINISH
  end
endmodule
