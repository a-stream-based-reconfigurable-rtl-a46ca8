// hdr_shift_reg: the router's 20-octet shift register.
//
// Packet data streams through DEPTH stages, one stage per enabled clock, so
// that when the first octet of a packet reaches the last stage the complete
// 20-octet IPv4 header is held in parallel: octet k sits in stage DEPTH-1-k.
// Each stage carries its octet's Pkt_start, Prgm and Valid flags with it.
// One stage can be rewritten on its way in: when mod_en_i is high the octet
// shifted into MOD_STAGE is mod_data_i instead of the one from the stage
// before (used to store the decremented TTL). Depth follows the prototype;
// the flag bits and the rewrite port are this design's.
// Timing: latency DEPTH clocks of en_i; stage_o[DEPTH-1] is the output.
module hdr_shift_reg
  import stream_pkg::*;
#(
  parameter int DEPTH     = 20,
  parameter int MOD_STAGE = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en_i,
  input  sr_word_t din_i,
  input  logic     mod_en_i,
  input  logic [7:0] mod_data_i,
  output sr_word_t stage_o [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage_o[i] <= '0;
    end else if (en_i) begin
      stage_o[0] <= din_i;
      for (int i = 1; i < DEPTH; i++) begin
        stage_o[i] <= stage_o[i-1];
        if (i == MOD_STAGE && mod_en_i) stage_o[i].data <= mod_data_i;
      end
    end
  end

endmodule
