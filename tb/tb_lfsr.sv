// tb_lfsr: checks the Galois LFSR against a bit-serial model and checks
// that 8-bit and 16-bit maximal tap sets give periods of 2**W-1.
`include "tb_check.svh"
module tb_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en8 = 0, en32 = 0, en16 = 0;
  logic [7:0]  s8;
  logic [31:0] s32;
  logic [15:0] s16;
  always #5 clk = ~clk;

  lfsr #(.WIDTH(8),  .TAPS(8'hB8),        .SEED(8'h01))  u8  (.clk, .rst_n, .en_i(en8),  .state_o(s8));
  lfsr                                                   u32 (.clk, .rst_n, .en_i(en32), .state_o(s32));
  lfsr #(.WIDTH(16), .TAPS(16'hB400),     .SEED(16'hACE1)) u16 (.clk, .rst_n, .en_i(en16), .state_o(s16));

  // Model: shift right, feed back the output bit into the tap positions.
  function automatic logic [31:0] model32(logic [31:0] s);
    logic fb = s[0];
    logic [31:0] n = {1'b0, s[31:1]};
    if (fb) begin n[31] = 1'b1; n[21] ^= 1'b1; n[1] ^= 1'b1; n[0] ^= 1'b1; end
    return n;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; `TB_FINISH
  end

  initial begin
    int period;
    logic [31:0] m;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    `CHECK(s8 == 8'h01 && s32 == 32'h1 && s16 == 16'hACE1, "reset loads SEED")
    // hold when not enabled
    repeat (3) @(posedge clk);
    `CHECK(s8 == 8'h01, "holds without en")
    // 32-bit against model
    m = s32;
    en32 <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      m = model32(m);
      `CHECK(s32 == m, $sformatf("32-bit step %0d: %h vs %h", i, s32, m))
    end
    en32 <= 0;
    // 8-bit period
    en8 <= 1; period = 0;
    do begin @(posedge clk); #1; period++; `CHECK(s8 != 0, "never zero") end
    while (s8 != 8'h01 && period < 1000);
    en8 <= 0;
    `CHECK(period == 255, $sformatf("8-bit period %0d", period))
    // 16-bit period
    en16 <= 1; period = 0;
    do begin @(posedge clk); #1; period++; end while (s16 != 16'hACE1 && period < 70000);
    en16 <= 0;
    `CHECK(period == 65535, $sformatf("16-bit period %0d", period))
    `TB_FINISH
  end
endmodule
