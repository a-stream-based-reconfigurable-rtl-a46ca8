// tb_hdr_shift_reg: pushes random words through the 20-stage register with
// random stalls, checks every stage against a model queue (latency 20
// enabled clocks) and checks the stage-12 rewrite.
`include "tb_check.svh"
module tb_hdr_shift_reg;
  import stream_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, mod_en = 0;
  logic [7:0] mod_data = 0;
  sr_word_t din = '0, st [20];
  sr_word_t model [20];
  int rewrites = 0;
  always #5 clk = ~clk;

  hdr_shift_reg u_dut (.clk, .rst_n, .en_i(en), .din_i(din), .mod_en_i(mod_en), .mod_data_i(mod_data), .stage_o(st));

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (model[i]) model[i] = '0;
    @(posedge clk);
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      din = sr_word_t'($urandom);
      mod_en = $urandom_range(0, 15) == 0;
      mod_data = 8'($urandom);
      @(posedge clk);
      if (en) begin
        for (int i = 19; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
        if (mod_en) begin model[12].data = mod_data; rewrites++; end
      end
      #1;
      for (int i = 0; i < 20; i++)
        `CHECK(st[i] == model[i], $sformatf("stage %0d %h vs %h", i, st[i], model[i]))
    end
    `CHECK(rewrites > 0, "rewrite exercised")
    `TB_FINISH
  end
endmodule
