// tb_rte_lu: checks the reset table, table writes through the configuration
// port, first-match lookup for random destinations, and the CBUS sequence
// (port with octet 0, nexthop nibbles MSB first with octets 1..8, then 0).
`include "tb_check.svh"
module tb_rte_lu;
  import stream_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, proc_ = 0, hit;
  logic [5:0] addr = 0; logic [7:0] data = 0;
  logic [31:0] dst = 0; logic [15:0] idx = 0; logic [3:0] cbus;
  route_t tbl [N_ROUTES];
  always #5 clk = ~clk;

  rte_lu u_dut (.clk, .rst_n, .cfg_we_i(we), .cfg_addr_i(addr), .cfg_data_i(data),
                .dst_i(dst), .proc_i(proc_), .hit_o(hit), .idx_i(idx), .cbus_o(cbus));

  initial begin repeat (200000) @(posedge clk); failures++; `TB_FINISH end

  task automatic lookup_and_check(logic [31:0] d);
    octq_t q = make_pkt(20, 20, 8'h45, 64, 32'h0101_0101, d);
    expect_t r = route(q, tbl);
    bit exp_hit = 0;
    for (int e = 0; e < N_ROUTES; e++) if (((d ^ tbl[e].net) & tbl[e].mask) == 0) exp_hit = 1;
    @(negedge clk); dst = d; proc_ = 1; idx = 0; #1;
    `CHECK(hit == exp_hit, $sformatf("hit for %h", d))
    if (exp_hit) `CHECK(cbus == r.port, $sformatf("port for %h: %0d vs %0d", d, cbus, r.port))
    @(negedge clk); proc_ = 0; dst = $urandom;
    for (int i = 1; i < 12; i++) begin
      idx = 16'(i); #1;
      if (exp_hit) `CHECK(cbus == cbus_at(r, i), $sformatf("cbus octet %0d", i))
    end
  endtask

  initial begin
    default_table(tbl);
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    // default table
    for (int e = 0; e < N_ROUTES; e++) lookup_and_check(tbl[e].net | 32'h0000_0007);
    lookup_and_check(32'h0102_0304);
    // program a new table, one octet per clock
    for (int e = 0; e < N_ROUTES; e++) begin
      tbl[e].mask = 32'hFFFF_FFFF << $urandom_range(4, 20);
      tbl[e].net  = $urandom & tbl[e].mask;
      tbl[e].nexthop = $urandom;
      tbl[e].port = 4'($urandom);
    end
    tbl[2].net = tbl[1].net; tbl[2].mask = tbl[1].mask;  // overlap: entry 1 wins
    begin
      automatic octq_t run = prgm_run(8'h01, tbl);
      for (int i = 1; i < run.size(); i++) begin
        @(negedge clk); we = 1; addr = 6'(i - 1); data = run[i];
      end
      @(negedge clk); we = 0;
    end
    for (int e = 0; e < N_ROUTES; e++) lookup_and_check(tbl[e].net ^ ($urandom & ~tbl[e].mask));
    for (int i = 0; i < 300; i++) lookup_and_check($urandom);
    `TB_FINISH
  end
endmodule
