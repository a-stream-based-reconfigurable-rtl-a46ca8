// tb_dec_ttl: exhaustive check of the TTL decrement and the expiry flag.
`include "tb_check.svh"
module tb_dec_ttl;
  int checks = 0, failures = 0;
  logic [7:0] ttl, ttl_o; logic exp;
  dec_ttl u_dut (.ttl_i(ttl), .ttl_o(ttl_o), .expired_o(exp));
  initial begin
    for (int t = 0; t < 256; t++) begin
      ttl = 8'(t); #1;
      `CHECK(ttl_o == 8'((t + 255) % 256), $sformatf("ttl %0d -> %0d", t, ttl_o))
      `CHECK(exp == (t < 2), $sformatf("expired for ttl %0d", t))
    end
    `TB_FINISH
  end
endmodule
