// tb_src_filter: checks that exactly the net-10 source addresses are
// flagged, for fixed corner cases and random addresses.
`include "tb_check.svh"
module tb_src_filter;
  int checks = 0, failures = 0;
  logic [31:0] src; logic drop;
  src_filter u_dut (.src_i(src), .drop_o(drop));
  initial begin
    logic [31:0] corner [6] = '{32'h0A00_0000, 32'h0AFF_FFFF, 32'h0B00_0000, 32'h090A_0A0A, 32'hC0A8_0A01, 32'h0A01_0203};
    bit          exp    [6] = '{1, 1, 0, 0, 0, 1};
    for (int i = 0; i < 6; i++) begin
      src = corner[i]; #1;
      `CHECK(drop == exp[i], $sformatf("corner %h", src))
    end
    for (int i = 0; i < 3000; i++) begin
      src = $urandom;
      if (i % 4 == 0) src[31:24] = 8'd10;
      #1;
      `CHECK(drop == (src >= 32'h0A00_0000 && src <= 32'h0AFF_FFFF), $sformatf("random %h", src))
    end
    `TB_FINISH
  end
endmodule
