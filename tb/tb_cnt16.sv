// tb_cnt16: drives random start/increment/enable patterns into the octet
// counter and compares with a model; a 4-bit instance checks saturation.
`include "tb_check.svh"
module tb_cnt16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, start = 0, inc = 0;
  logic [15:0] cnt;
  logic [3:0]  c4;
  int model, m4;
  always #5 clk = ~clk;

  cnt16           u_dut (.clk, .rst_n, .en_i(en), .start_i(start), .inc_i(inc), .count_o(cnt));
  cnt16 #(.WIDTH(4)) u_4 (.clk, .rst_n, .en_i(en), .start_i(start), .inc_i(inc), .count_o(c4));

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1; model = 0; m4 = 0;
    @(posedge clk); #1;
    `CHECK(cnt == 0, "reset clears")
    for (int i = 0; i < 5000; i++) begin
      en    <= ($urandom_range(0, 9) != 0);
      start <= ($urandom_range(0, 40) == 0);
      inc   <= ($urandom_range(0, 7) != 0);
      @(posedge clk); #1;
      if (en) begin
        if (start) begin model = 1; m4 = 1; end
        else if (inc) begin
          if (model != 65535) model++;
          if (m4 != 15) m4++;
        end
      end
      `CHECK(cnt == 16'(model), $sformatf("count %0d vs %0d", cnt, model))
      `CHECK(c4 == 4'(m4), $sformatf("4-bit count %0d vs %0d", c4, m4))
    end
    `CHECK(m4 == 15 || model < 15, "saturation reached") // 40-cycle runs saturate 4 bits
    `TB_FINISH
  end
endmodule
