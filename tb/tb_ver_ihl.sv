// tb_ver_ihl: presents first octets with random version/IHL nibbles and
// checks the version flag and the stored header length in octets, and that
// octets without Pkt_start or without enable leave the registers alone.
`include "tb_check.svh"
module tb_ver_ihl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, start = 0;
  logic [7:0] octet = 0;
  logic ver_ok; logic [15:0] hb;
  logic exp_ok; int exp_hb;
  always #5 clk = ~clk;

  ver_ihl u_dut (.clk, .rst_n, .en_i(en), .start_i(start), .octet_i(octet), .ver_ok_o(ver_ok), .hdr_bytes_o(hb));

  initial begin repeat (20000) @(posedge clk); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1; exp_ok = 0; exp_hb = 0;
    @(posedge clk); #1;
    `CHECK(!ver_ok && hb == 0, "reset")
    for (int i = 0; i < 2000; i++) begin
      octet <= (i % 3 == 0) ? 8'h45 : 8'($urandom);
      start <= $urandom_range(0, 2) != 0;
      en    <= $urandom_range(0, 4) != 0;
      @(posedge clk); #1;
      if (en && start) begin exp_ok = (octet[7:4] == 4); exp_hb = 4 * octet[3:0]; end
      `CHECK(ver_ok == exp_ok, "version flag")
      `CHECK(hb == 16'(exp_hb), $sformatf("header bytes %0d vs %0d", hb, exp_hb))
    end
    `TB_FINISH
  end
endmodule
